// contrail_pkg: types and constants shared by the Contrail chip-multiprocessor.
//
// Word and address widths follow a 32-bit MIPS-like instruction set (PISA):
// 32-bit registers, 32 architectural integer registers, 8-byte instructions
// (so the three low PC bits carry no information for table indexing). The two
// voltage/frequency operating points are the ones of the design's scaling
// table: 800 MHz at 1.3 V for high-speed mode and 400 MHz at 1.0 V for
// low-speed mode. The number of registers a trace may carry (MAX_REGS) is a
// choice of this implementation.
package contrail_pkg;

  localparam int XLEN      = 32;  // register width
  localparam int PCW       = 32;  // instruction address width
  localparam int RIDW      = 5;   // architectural register identifier width
  localparam int INSN_SHIFT = 3;  // 8-byte instructions
  localparam int MAX_REGS  = 4;   // registers per trace (slots drawn in the trace-table layout)
  localparam int NREGW     = $clog2(MAX_REGS + 1);

  typedef logic [XLEN-1:0] word_t;
  typedef logic [PCW-1:0]  pc_t;
  typedef logic [RIDW-1:0] rid_t;

  // State of a processing element on the ring.
  typedef enum logic [1:0] {
    PE_FREE   = 2'd0,
    PE_SPEC   = 2'd1,   // runs the speculation stream (the head of the ring)
    PE_VERIFY = 2'd2    // runs a verification stream
  } pe_state_e;

  // Speed mode of a PE's voltage/frequency controller.
  typedef enum logic {
    MODE_HIGH = 1'b0,
    MODE_LOW  = 1'b1
  } speed_mode_e;

  // Operating points.
  localparam int HIGH_FREQ_MHZ = 800;
  localparam int HIGH_VDD_MV   = 1300;
  localparam int LOW_FREQ_MHZ  = 400;
  localparam int LOW_VDD_MV    = 1000;

  // Integer ALU operations (MIPS-like).
  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,
    OP_SUB  = 4'd1,
    OP_AND  = 4'd2,
    OP_OR   = 4'd3,
    OP_XOR  = 4'd4,
    OP_NOR  = 4'd5,
    OP_SLT  = 4'd6,
    OP_SLTU = 4'd7,
    OP_SLL  = 4'd8,
    OP_SRL  = 4'd9,
    OP_SRA  = 4'd10,
    OP_LUI  = 4'd11
  } alu_op_e;

  // One predicted live-out register of a trace.
  typedef struct packed {
    rid_t  rid;    // architectural register
    pc_t   pc;     // address of the instruction in the trace that produces it
    word_t value;  // predicted value
  } reg_pred_t;

  // Trace description held in the trace table.
  typedef struct packed {
    pc_t                      next_pc;  // first instruction after the trace
    logic [NREGW-1:0]         nregs;    // number of valid register slots
    rid_t [MAX_REGS-1:0]      rids;     // register identifiers
    pc_t  [MAX_REGS-1:0]      pcs;      // producing instruction of each register
  } trace_info_t;

  // Packet sent over the ring link when a speculation stream is spawned on
  // the next PE: where to start and the predicted register values to start from.
  typedef struct packed {
    pc_t                      start_pc;
    logic [NREGW-1:0]         nregs;
    rid_t  [MAX_REGS-1:0]     rids;
    word_t [MAX_REGS-1:0]     values;
  } spawn_pkt_t;

endpackage
