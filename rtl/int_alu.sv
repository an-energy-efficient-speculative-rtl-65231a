// int_alu: integer ALU with a fixed latency, for the fast and slow units of
// the execution cluster.
//
// A fast unit (LATENCY = 1) runs at the full clock and high supply voltage
// and finishes an operation in one cycle. A slow unit (LATENCY = 2) stands for
// the same ALU clocked at half the frequency and supplied with the lower
// voltage: seen from the full-speed clock it takes two cycles per operation
// and accepts a new one only every second cycle (not pipelined: it is
// ready again in cycle t + LATENCY). These
// latencies follow the design; the operation set (MIPS-like) and the
// handshake are this implementation's.
//
// Interface and timing: an operation is accepted in cycle t when
// in_valid_i && in_ready_o; out_valid_o, out_value_o and out_meta_o are
// registered and shown in cycle t + LATENCY for one cycle.
module int_alu
  import contrail_pkg::*;
#(
  parameter int LATENCY = 1,
  parameter int METAW   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid_i,
  output logic             in_ready_o,
  input  alu_op_e          op_i,
  input  word_t            a_i,
  input  word_t            b_i,
  input  logic [METAW-1:0] meta_i,
  output logic             out_valid_o,
  output word_t            out_value_o,
  output logic [METAW-1:0] out_meta_o,
  output logic             busy_o       // an operation is in flight this cycle
);
  localparam int CW = $clog2(LATENCY + 1);

  logic [CW-1:0]    left;     // cycles until the result is shown
  word_t            res_q;
  logic [METAW-1:0] meta_q;

  function automatic word_t compute(alu_op_e op, word_t a, word_t b);
    unique case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_NOR:  return ~(a | b);
      OP_SLT:  return word_t'($signed(a) < $signed(b));
      OP_SLTU: return word_t'(a < b);
      OP_SLL:  return a << b[4:0];
      OP_SRL:  return a >> b[4:0];
      OP_SRA:  return word_t'($signed(a) >>> b[4:0]);
      OP_LUI:  return {b[15:0], 16'd0};
      default: return '0;
    endcase
  endfunction

  assign in_ready_o = (left == '0);

  generate
    if (LATENCY == 1) begin : g_fast
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          left        <= '0;
          out_valid_o <= 1'b0;
          out_value_o <= '0;
          out_meta_o  <= '0;
        end else begin
          left        <= '0;
          out_valid_o <= in_valid_i;
          out_value_o <= compute(op_i, a_i, b_i);
          out_meta_o  <= meta_i;
        end
      end
      assign res_q  = '0;
      assign meta_q = '0;
    end else begin : g_slow
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          left        <= '0;
          res_q       <= '0;
          meta_q      <= '0;
          out_valid_o <= 1'b0;
          out_value_o <= '0;
          out_meta_o  <= '0;
        end else begin
          out_valid_o <= (left == CW'(1));
          out_value_o <= res_q;
          out_meta_o  <= meta_q;
          if (in_valid_i && in_ready_o) begin
            left   <= CW'(LATENCY - 1);
            res_q  <= compute(op_i, a_i, b_i);
            meta_q <= meta_i;
          end else if (left != '0) begin
            left <= left - 1'b1;
          end
        end
      end
    end
  endgenerate

  assign busy_o = (left != '0) || in_valid_i;

endmodule
