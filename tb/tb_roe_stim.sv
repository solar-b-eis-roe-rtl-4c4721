// tb_roe_stim: runs the stimulus pattern of CSG block 6 on the full-size board.
//
// roe_top runs with every parameter at its default and the default PROM
// image, which also loads the stimulus program into block 6. After power-on
// the ICU sends Exit default (9600 baud), waits for the default flush to end
// and starts block 6. The stimulus program reads out 512 lines of 1024 pixels
// per output, with STIM_L/STIM_R raised for the "light" pixels. Each output
// must show this image (the four outputs together look like a 2048 x 512
// CCD pair with the pattern mirrored about each CCD centre):
//   lines   0..242  stripes: 1,1,1,1 pixels dark/light/dark/light, then the
//                    same four runs of 2, 4, 8 ... 128 pixels, then 1,1,1,1
//   lines 243..257  dark
//   lines 258..506  stripes as above
//   lines 507..511  light
// At every CONVST_N the testbench compares STIM_L and STIM_R with this image.
// The ADC model turns a light pixel into code 0x3FFF and a dark one into
// 0x0040, and the ICU's science receiver counts the light and dark characters,
// the whole frame and its 0xCC end of frame. The status link must report
// the ACKs and the end of sequence for block 6.
module tb_roe_stim;
  import roe_pkg::*;
  localparam int DIV = 3333;
  localparam int LINES = 512, PIX = 1024;

  logic clk = 0, por_n = 0;
  always #5 clk = ~clk;

  logic cmd_rx, status_tx, sci_data, sci_strobe, adc_valid;
  logic [13:0] adc_data [4];
  logic sys_reset_n, bp_d_oe, bp_wr_en, bp_rd_en;
  logic [5:0] bp_a; logic [7:0] bp_d_out, bp_d_in;
  logic [6:0] hk_mux_sel; logic hk_conv_start_n, hk_shut_down_n, hk_oe_n, hk_data_rdy;
  logic convst_n, clamp_n, isolate, shut_down_n, stim_r, stim_l, eos, v15_on, chrg_pump;
  ccd_clk_t ccd; logic default_mode, csg_busy;

  roe_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  assign hk_data_rdy = 1'b0;
  assign bp_d_in = 8'h00;

  // expected light pixels of a striped line
  bit stripe [PIX];
  function automatic bit light(input int l, input int p);
    if (l < 243) return stripe[p];
    if (l < 258) return 1'b0;
    if (l < 507) return stripe[p];
    return 1'b1;
  endfunction

  int  conv_n = 0, adc_t = -1, bad_pix = 0, n_stim = 0;
  bit  conv_d = 1, cur_light = 0, run = 0;
  always @(negedge clk) begin
    adc_valid = 0;
    if (sys_reset_n && conv_d && !convst_n && run) begin
      if (stim_l != stim_r || stim_l != light(conv_n / PIX, conv_n % PIX)) begin
        if (bad_pix < 5) $display("pixel %0d of line %0d: stim %b%b", conv_n % PIX, conv_n / PIX, stim_l, stim_r);
        bad_pix++;
      end
      cur_light = stim_l;
      adc_t = 10; conv_n++;
    end
    conv_d = convst_n;
    if (adc_t == 0) begin
      for (int k = 0; k < 4; k++) adc_data[k] = cur_light ? 14'h3FFF : 14'h0040;
      adc_valid = 1;
    end
    if (adc_t >= 0) adc_t--;
  end

  logic [15:0] char_data; logic char_valid, sci_eof, sci_err; logic [7:0] eof_data;
  int n_chars = 0, n_light = 0, n_eof = 0;
  sci_link_rx #(.POS(317)) u_sci_rx (.clk, .sd(sci_data), .ss(sci_strobe), .char_data,
                                     .char_valid, .eof_data, .eof(sci_eof), .err(sci_err));
  always @(negedge clk) begin
    if (char_valid) begin
      n_chars++;
      if (char_data[13:0] == 14'h3FFF) n_light++;
      else if (char_data[13:0] != 14'h0040) check(0, $sformatf("science char %h", char_data));
    end
    if (sci_eof) begin n_eof++; check(eof_data == 8'hCC, "end of frame character"); end
  end

  logic [7:0] st_byte; logic st_valid; int st_ferr;
  uart_mon #(.DIV(DIV)) u_st_mon (.clk, .line(status_tx), .data(st_byte), .valid(st_valid),
                                  .frame_err(st_ferr));
  logic [15:0] msg_q [$];
  logic [7:0]  first_b; bit have_first = 0;
  always @(negedge clk) if (st_valid) begin
    if (!have_first) begin first_b = st_byte; have_first = 1; end
    else begin have_first = 0; msg_q.push_back({first_b, st_byte}); end
  end

  task automatic send_byte(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin cmd_rx = f[i]; repeat (DIV) @(negedge clk); end
  endtask
  task automatic expect_msg(input logic [15:0] m, input int max_cyc, input string what);
    int t;
    t = 0;
    while (msg_q.size() == 0 && t < max_cyc) begin @(negedge clk); t++; end
    if (msg_q.size() == 0) check(0, {what, ": no status message"});
    else begin
      logic [15:0] g;
      g = msg_q.pop_front();
      check(g == m, $sformatf("%s: got %h expected %h", what, g, m));
    end
  endtask

  initial begin
    int p, n_exp;
    p = 0;
    foreach (stripe[i]) stripe[i] = 0;
    for (int r = 0; r < 4; r++) begin stripe[p] = r[0]; p++; end
    for (int k = 2; k <= 128; k *= 2)
      for (int r = 0; r < 4; r++)
        for (int j = 0; j < k; j++) begin stripe[p] = r[0]; p++; end
    for (int r = 0; r < 4; r++) begin stripe[p] = r[0]; p++; end
    check(p == PIX, "stripe line is 1024 pixels");
    n_exp = 0;
    for (int l = 0; l < LINES; l++) for (int i = 0; i < PIX; i++) n_exp += light(l, i);

    cmd_rx = 1;
    repeat (5) @(negedge clk);
    por_n = 1;
    wait (sys_reset_n);
    send_byte(8'h41);
    expect_msg({ST_ACK_ERR, ACK_OK}, 100_000, "Exit default ACK");
    // the default flush already started completes and reports block 0
    expect_msg({ST_EOSEQ, 8'd0}, 2_000_000, "end of flush");
    while (csg_busy) @(negedge clk);
    run = 1;
    send_byte(8'h42); send_byte(8'h06);
    expect_msg({ST_ACK_ERR, ACK_OK}, 100_000, "Start CSG ACK");
    expect_msg({ST_EOSEQ, 8'd6}, 40_000_000, "end of stimulus readout");
    repeat (20_000) @(negedge clk);
    check(!csg_busy, "stimulus program halted");
    check(conv_n == LINES * PIX, $sformatf("%0d conversions", conv_n));
    check(bad_pix == 0, $sformatf("%0d pixels with the wrong stimulus", bad_pix));
    check(n_chars == LINES * PIX * 4, $sformatf("%0d science characters", n_chars));
    check(n_light == 4 * n_exp, $sformatf("%0d light characters, expected %0d", n_light, 4 * n_exp));
    check(n_eof == 1, "one end of frame");
    check(st_ferr == 0 && msg_q.size() == 0, "no other status messages");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
