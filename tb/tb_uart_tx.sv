// tb_uart_tx: self-checking test of the status-link transmitter.
//
// Offers random bytes back to back and decodes the line independently: the
// start bit must be low, the data LSB first, the stop bit high, every bit must
// last exactly DIV clocks, and a byte must take exactly ten bit times from one
// start edge to the next.
module tb_uart_tx;
  localparam int DIV = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] tx_data; logic tx_valid, tx_ready, tx;
  int checks = 0, failures = 0;
  logic [7:0] sent_q[$];

  uart_tx #(.CLK_HZ(32_000_000), .BAUD(32_000_000 / DIV)) dut (.*);

  // producer
  initial begin
    tx_valid = 0; tx_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      @(negedge clk);
      tx_data = 8'($urandom); tx_valid = 1;
      while (!tx_ready) @(negedge clk);
      sent_q.push_back(tx_data);
      @(negedge clk); tx_valid = 0;
    end
  end

  // independent line decoder
  initial begin
    int last_start = -1, t = 0;
    logic [7:0] b;
    @(posedge rst_n);
    for (int k = 0; k < 30; k++) begin
      while (tx) begin @(posedge clk); t++; end
      if (last_start >= 0) begin
        checks++; if (t - last_start != 10 * DIV) begin failures++; $display("char period %0d", t - last_start); end
      end
      last_start = t;
      repeat (DIV / 2) begin @(posedge clk); t++; end
      checks++; if (tx) begin failures++; $display("start bit"); end
      for (int i = 0; i < 8; i++) begin repeat (DIV) begin @(posedge clk); t++; end b[i] = tx; end
      repeat (DIV) begin @(posedge clk); t++; end
      checks++; if (!tx) begin failures++; $display("stop bit"); end
      checks++;
      if (sent_q.size() == 0 || b != sent_q.pop_front()) begin failures++; $display("data %h", b); end
      repeat (DIV / 2 - 1) begin @(posedge clk); t++; end
    end
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
