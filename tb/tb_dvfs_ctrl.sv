// tb_dvfs_ctrl: self-checking test of the voltage/frequency controller.
// Checks the low-speed operating point after reset (400 MHz, 1.0 V, clock
// enable in every other cycle), the order of a change to high speed (voltage
// first, frequency VSETTLE cycles later, clock enable then in every cycle),
// and the immediate return to low speed.
module tb_dvfs_ctrl;
  import contrail_pkg::*;

  logic        clk = 0, rst_n = 0;
  speed_mode_e mode_i = MODE_LOW;
  logic        clk_en_o, ready_o;
  logic [10:0] vdd_mv_o;
  logic [9:0]  freq_mhz_o;
  speed_mode_e freq_mode_o;
  int          checks = 0, failures = 0;

  dvfs_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int en_count, up_cycle;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check("reset: 400 MHz", freq_mhz_o == 10'd400);
    check("reset: 1.0 V", vdd_mv_o == 11'd1000);
    check("reset: ready", ready_o);
    en_count = 0;
    for (int c = 0; c < 20; c++) begin en_count += clk_en_o; @(posedge clk); #1; end
    check("low speed: enable in half the cycles", en_count == 10);

    // to high speed
    @(negedge clk); mode_i = MODE_HIGH;
    @(posedge clk); #1;
    check("voltage raised first", vdd_mv_o == 11'd1300 && freq_mhz_o == 10'd400 && !ready_o);
    up_cycle = -1;
    for (int c = 1; c < 20 && up_cycle < 0; c++) begin
      check("frequency never ahead of voltage", !(freq_mhz_o == 10'd800 && vdd_mv_o != 11'd1300));
      @(posedge clk); #1;
      if (freq_mhz_o == 10'd800) up_cycle = c;
    end
    check("frequency raised VSETTLE+1 cycles after the request", up_cycle == 5);
    check("high speed: ready", ready_o && freq_mode_o == MODE_HIGH);
    en_count = 0;
    for (int c = 0; c < 20; c++) begin en_count += clk_en_o; @(posedge clk); #1; end
    check("high speed: enable in every cycle", en_count == 20);

    // back to low speed
    @(negedge clk); mode_i = MODE_LOW;
    @(posedge clk); #1;
    check("low speed at once", freq_mhz_o == 10'd400 && vdd_mv_o == 11'd1000 && ready_o);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
