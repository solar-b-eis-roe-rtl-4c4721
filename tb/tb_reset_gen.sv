// tb_reset_gen: checks the board reset generator.
//
// rst_n must be low during power-on reset and for HOLD cycles after it, must
// fall within two cycles of a hard-reset pulse, and must again stay low for
// HOLD cycles after the pulse.
module tb_reset_gen;
  localparam int HOLD = 16;
  logic clk = 0, por_n = 0, hard_rst = 0, rst_n;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  reset_gen #(.HOLD(HOLD)) dut (.*);

  task automatic measure_low(input string what);
    int n;
    n = 0;
    while (!rst_n) begin @(negedge clk); n++; end
    checks++; if (n < HOLD || n > HOLD + 3) begin failures++; $display("%s: low for %0d", what, n); end
  endtask

  initial begin
    repeat (5) @(negedge clk);
    checks++; if (rst_n) begin failures++; $display("not in reset during POR"); end
    por_n = 1;
    measure_low("por");
    repeat (10) @(negedge clk);
    checks++; if (!rst_n) failures++;
    hard_rst = 1; @(negedge clk); hard_rst = 0;
    @(negedge clk);
    checks++; if (rst_n) begin failures++; $display("hard reset not applied"); end
    measure_low("hard");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
