// tb_uart_rx: self-checking test of the command-link receiver.
//
// Sends random bytes as start bit, 8 data bits LSB first and stop bit with a
// bit time of 16 clocks (baud rate scaled up for speed), checks each received
// byte and that it appears within ten bit times of its start edge, checks
// that a frame with a missing stop bit is flagged and discarded, and that a
// short glitch on the idle line is not taken as a start bit.
module tb_uart_rx;
  localparam int DIV = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rx = 1; logic [7:0] rx_data; logic rx_valid, rx_ready, frame_err, overrun;
  int checks = 0, failures = 0, n_ferr = 0;

  uart_rx #(.CLK_HZ(32_000_000), .BAUD(32_000_000 / DIV)) dut (.*);

  always @(posedge clk) if (rst_n && frame_err) n_ferr++;

  task automatic send(input logic [7:0] b, input logic stop);
    @(negedge clk);
    rx = 0; repeat (DIV) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (DIV) @(negedge clk); end
    rx = stop; repeat (DIV) @(negedge clk);
    rx = 1; repeat (2) @(negedge clk);
  endtask

  initial begin
    logic [7:0] b;
    rx_ready = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      b = 8'($urandom);
      fork
        send(b, 1'b1);
        begin
          int t;
          t = 0;
          while (!rx_valid && t < 11 * DIV) begin @(negedge clk); t++; end
          checks++;
          if (!rx_valid || rx_data != b) begin failures++; $display("byte %h got %h v=%b", b, rx_data, rx_valid); end
        end
      join
    end
    // framing error
    send(8'h5A, 1'b0);
    checks++; if (n_ferr != 1) begin failures++; $display("frame errors %0d", n_ferr); end
    // glitch
    @(negedge clk); rx = 0; repeat (3) @(negedge clk); rx = 1;
    repeat (20 * DIV) @(negedge clk);
    checks++; if (rx_valid) begin failures++; $display("glitch accepted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
