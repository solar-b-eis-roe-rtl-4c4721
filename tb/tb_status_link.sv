// tb_status_link: self-checking test of the two-byte status message sender.
//
// Two producers offer random messages, sometimes in the same cycle; the port
// b (end of sequence) producer must win a tie. The serial line is decoded
// independently and every message must arrive whole (ID then data, never
// interleaved) in the order accepted, and the four-entry FIFO must refuse a
// fifth message while full.
module tb_status_link;
  import roe_pkg::*;
  localparam int DIV = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  status_msg_t a_msg, b_msg; logic a_valid, a_ready, b_valid, b_ready, tx;
  logic [7:0] rb; logic rv; int ferr;
  int checks = 0, failures = 0, full_seen = 0, tie_seen = 0;
  status_msg_t acc_q[$];
  logic [7:0] rx_q[$];

  status_link #(.CLK_HZ(32_000_000), .BAUD(32_000_000 / DIV)) dut (.*);
  uart_mon #(.DIV(DIV)) mon (.clk, .line(tx), .data(rb), .valid(rv), .frame_err(ferr));

  always @(posedge clk) begin
    if (rv) rx_q.push_back(rb);
  end

  initial begin
    a_valid = 0; b_valid = 0; a_msg = '0; b_msg = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      a_msg = status_msg_t'($urandom); b_msg = status_msg_t'($urandom);
      a_valid = ($urandom % 3) != 0;
      b_valid = ($urandom % 3) == 0;
      if (k < 6) begin a_valid = 1; b_valid = 0; end    // burst fills the FIFO
      #1;
      if (a_valid && b_valid) begin
        tie_seen++; checks++;
        if (a_ready) begin failures++; $display("a accepted in a tie"); end
      end
      if (a_valid && !a_ready && !b_valid) full_seen++;
      if (b_valid && b_ready) acc_q.push_back(b_msg);
      else if (a_valid && a_ready) acc_q.push_back(a_msg);
      @(negedge clk); a_valid = 0; b_valid = 0;
      if (k >= 6) repeat ($urandom % (30 * DIV)) @(negedge clk);
    end
    wait (acc_q.size() * 2 == rx_q.size());
    repeat (20 * DIV) @(negedge clk);
    checks++; if (rx_q.size() != 2 * acc_q.size()) begin failures++; $display("bytes %0d msgs %0d", rx_q.size(), acc_q.size()); end
    foreach (acc_q[i]) begin
      checks++;
      if (rx_q[2*i] != acc_q[i].id || rx_q[2*i+1] != acc_q[i].data) begin
        failures++; $display("msg %0d: %h %h exp %h", i, rx_q[2*i], rx_q[2*i+1], acc_q[i]);
      end
    end
    checks++; if (full_seen == 0) begin failures++; $display("FIFO never full"); end
    checks++; if (ferr != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
