// tb_science_link_tx: checks the data-strobe science link transmitter.
//
// Frames of random pixel groups are offered at the full rate (one group of
// four 14-bit words every 64 clocks) and with random gaps; an ICU receiver
// model decodes the data-strobe line. Every character must arrive with the
// right CCD/node header (00, 01, 10, 11 in turn) and data, the line must
// never pause inside a character, each frame must end with exactly one 0xCC
// end-of-frame character followed by silence, a group offered during the
// silence after 0xCC or on top of a waiting group must be flagged, and after
// a Period of Silence data and strobe must both be '0'.
module tb_science_link_tx;
  localparam int POS = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pix_valid, eof, sd, ss, overflow, holding;
  logic [13:0] pix_data [4];
  logic [15:0] cd; logic cv; logic [7:0] ed; logic ev, er;
  int checks = 0, failures = 0, n_eof = 0, n_err = 0, n_ovf = 0, n_chars = 0;
  logic [15:0] exp_q[$];

  science_link_tx #(.POS_CYC(POS)) dut (.*);
  sci_link_rx #(.POS(POS - 10)) rx (.clk, .sd, .ss, .char_data(cd), .char_valid(cv),
                                    .eof_data(ed), .eof(ev), .err(er));

  always @(negedge clk) begin
    if (cv) begin
      n_chars++; checks++;
      if (exp_q.size() == 0 || cd != exp_q.pop_front()) begin failures++; $display("char %h", cd); end
    end
    if (ev) begin n_eof++; checks++; if (ed != 8'hCC) begin failures++; $display("eof %h", ed); end end
    if (er) begin n_err++; failures++; $display("link error"); end
    if (overflow) n_ovf++;
  end

  task automatic group(input int gap);
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      pix_data[i] = 14'($urandom);
      if (!holding) exp_q.push_back({2'(i), pix_data[i]});
    end
    pix_valid = 1; @(negedge clk); pix_valid = 0;
    repeat (gap - 2) @(negedge clk);
  endtask

  initial begin
    pix_valid = 0; eof = 0;
    for (int i = 0; i < 4; i++) pix_data[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int g = 0; g < 20; g++) group((f == 1) ? 64 + ($urandom % 40) : 64);
      repeat (70) @(negedge clk);
      @(negedge clk); eof = 1; @(negedge clk); eof = 0;
      // a group during the silence after 0xCC is refused
      repeat (30) @(negedge clk);
      checks++; if (!holding) begin failures++; $display("not holding"); end
      group(2);
      repeat (POS + 50) @(negedge clk);
      checks++; if (sd || ss) begin failures++; $display("line not reset after silence"); end
    end
    // overflow: two groups in consecutive cycles while the shifter is busy
    group(2); group(2); group(2);
    repeat (POS + 300) @(negedge clk);
    checks++; if (n_eof != 3) begin failures++; $display("eof count %0d", n_eof); end
    checks++; if (n_ovf < 4) begin failures++; $display("overflow count %0d", n_ovf); end
    checks++; if (n_chars != 3 * 80 + 8) begin failures++; $display("chars %0d", n_chars); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
