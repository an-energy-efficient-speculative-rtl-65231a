// dvfs_ctrl: the voltage/frequency (Vdd/Clk) controller of one processing
// element.
//
// A PE runs either in high-speed mode (800 MHz, 1.3 V: the speculation
// stream) or in low-speed mode (400 MHz, 1.0 V: verification streams); these
// two operating points follow the design. The controller is the digital part
// of the block: it requests the supply voltage from the regulator (vdd_mv_o)
// and produces the PE's clock as an enable on the 800 MHz base clock, high in
// every cycle in high-speed mode and in every other cycle in low-speed mode.
// The ordering of a change is this implementation's choice, as the safe
// order for a voltage/frequency pair: going up, the voltage is raised first
// and the frequency follows after VSETTLE base-clock cycles; going down, the
// frequency drops at once and the voltage with it, since a lower frequency is
// safe at either voltage. ready_o is low while a change is in progress.
//
// Interface and timing: mode_i is sampled every base-clock cycle; a change to
// MODE_LOW takes effect on freq_mhz_o/vdd_mv_o in the next cycle; a change to
// MODE_HIGH raises vdd_mv_o in the next cycle and freq_mhz_o VSETTLE + 1
// cycles after that.
module dvfs_ctrl
  import contrail_pkg::*;
#(
  parameter int VSETTLE = 4
) (
  input  logic        clk,       // base clock at the high-speed frequency
  input  logic        rst_n,
  input  speed_mode_e mode_i,
  output logic        clk_en_o,  // PE clock enable
  output logic [10:0] vdd_mv_o,  // requested supply voltage in mV
  output logic [9:0]  freq_mhz_o,
  output speed_mode_e freq_mode_o,
  output logic        ready_o
);
  localparam int SW = $clog2(VSETTLE + 1);

  speed_mode_e      vmode, fmode;   // voltage and frequency operating points
  logic [SW-1:0]    settle;
  logic             phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vmode  <= MODE_LOW;
      fmode  <= MODE_LOW;
      settle <= '0;
      phase  <= 1'b0;
    end else begin
      phase <= ~phase;
      if (mode_i == MODE_LOW) begin
        fmode  <= MODE_LOW;
        vmode  <= MODE_LOW;
        settle <= '0;
      end else if (vmode == MODE_LOW) begin
        vmode  <= MODE_HIGH;          // raise the voltage first
        settle <= SW'(VSETTLE);
      end else if (settle != '0) begin
        settle <= settle - 1'b1;
      end else begin
        fmode  <= MODE_HIGH;          // then the frequency
      end
    end
  end

  assign clk_en_o    = (fmode == MODE_HIGH) ? 1'b1 : phase;
  assign vdd_mv_o    = (vmode == MODE_HIGH) ? 11'(HIGH_VDD_MV) : 11'(LOW_VDD_MV);
  assign freq_mhz_o  = (fmode == MODE_HIGH) ? 10'(HIGH_FREQ_MHZ) : 10'(LOW_FREQ_MHZ);
  assign freq_mode_o = fmode;
  assign ready_o     = (fmode == mode_i) && (vmode == mode_i);

  // The frequency never runs ahead of the voltage.
  assert property (@(posedge clk) disable iff (!rst_n)
                   fmode == MODE_HIGH |-> vmode == MODE_HIGH);

endmodule
