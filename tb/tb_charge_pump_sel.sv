// tb_charge_pump_sel: checks the -10 V charge pump drive selection.
//
// With chrg_pmp = 0 the output must be a free-running square wave of
// 500 kHz (64 clocks per period at 32 MHz, 32 high and 32 low); with
// chrg_pmp = 1 it must follow chrg_sync one clock later.
module tb_charge_pump_sel;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic chrg_pmp, chrg_sync, pump;
  int checks = 0, failures = 0;

  charge_pump_sel dut (.*);

  initial begin
    int t, last_rise, hi;
    chrg_pmp = 0; chrg_sync = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // oscillator mode: time between successive edges, in clocks
    @(negedge clk);
    t = 0; last_rise = -1; hi = pump;
    for (int e = 0; e < 10; ) begin
      @(negedge clk); t++;
      if (pump != hi) begin
        if (last_rise >= 0) begin
          checks++; if (t - last_rise != 32) begin failures++; $display("half period %0d", t - last_rise); end
          e++;
        end
        last_rise = t; hi = pump;
      end
    end
    // CSG mode
    @(negedge clk); chrg_pmp = 1;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk); chrg_sync = 1'($urandom);
      @(negedge clk);
      checks++; if (pump != chrg_sync) begin failures++; $display("follow"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
