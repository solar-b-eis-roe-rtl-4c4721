// tb_roe_full: one full default-mode frame of the ROE board at its real timing.
//
// roe_top runs with every parameter at its default: 32 MHz clock, 9600 baud
// links, the flight default-mode PROM (rtl/default_prom.hex), an 8 s
// integration and a 10 ms science link Period of Silence. After power-on the
// board replays the PROM (analogue set-up, flush program in block 0, readout
// program in block 1), flushes the 1024 lines of the CCDs, integrates for 8 s
// and reads out a 512 line x 1024 pixel window of all four outputs (50
// discarded pixels per line). An ADC model answers every CONVST_N with four
// pixel words; the ICU's science receiver checks each of the 2,097,152
// characters in order, the 0xCC end of frame and the 2 us pixel period. The
// ICU then sends Exit default at 9600 baud and must get 0x03 0x00, with no
// further CSG start. The end-of-sequence status messages for flush and
// readout, the integration time and the readout time are checked too.
module tb_roe_full;
  import roe_pkg::*;
  localparam int DIV = 3333;                 // 32 MHz / 9600 baud
  localparam longint INTEG = 256_000_000;
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

  // analogue PCB registers and an idle HK ADC
  logic [7:0] ae_regs [64];
  logic wr_d;
  always @(posedge clk) begin
    wr_d <= bp_wr_en;
    if (wr_d && !bp_wr_en) ae_regs[bp_a] <= bp_d_out;
  end
  assign hk_data_rdy = 1'b0;
  assign bp_d_in = bp_rd_en ? ae_regs[bp_a] : 8'h00;

  // ADC model; expected characters follow from the pixel number
  longint pix_n = 0, conv_n = 0, conv_t = 0, last_conv = 0, cyc = 0;
  int  adc_t = -1, bad_period = 0;
  bit  conv_d = 1;
  always @(negedge clk) begin
    cyc++;
    adc_valid = 0;
    if (sys_reset_n && conv_d && !convst_n) begin
      adc_t = 10; conv_n++;
      // inside a line the pixels are 64 clocks (2 us) apart
      if (conv_n % PIX != 1 && cyc - last_conv != 64) bad_period++;
      last_conv = cyc;
    end
    conv_d = convst_n;
    if (adc_t == 0) begin
      for (int k = 0; k < 4; k++) adc_data[k] = 14'((pix_n * 4 + k) * 37);
      adc_valid = 1; pix_n++;
    end
    if (adc_t >= 0) adc_t--;
  end

  logic [15:0] char_data; logic char_valid, sci_eof, sci_err; logic [7:0] eof_data;
  longint n_chars = 0, bad_chars = 0;
  int n_eof = 0;
  sci_link_rx #(.POS(317)) u_sci_rx (.clk, .sd(sci_data), .ss(sci_strobe), .char_data,
                                     .char_valid, .eof_data, .eof(sci_eof), .err(sci_err));
  always @(negedge clk) begin
    if (char_valid) begin
      if (char_data != {2'(n_chars % 4), 14'((n_chars / 4 * 4 + n_chars % 4) * 37)}) begin
        if (bad_chars < 5) $display("science char %0d: %h", n_chars, char_data);
        bad_chars++;
      end
      n_chars++;
    end
    if (sci_eof) begin
      n_eof++;
      check(eof_data == 8'hCC, "end of frame character");
      check(n_chars == longint'(LINES) * PIX * 4, $sformatf("frame of %0d characters", n_chars));
    end
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
  task automatic expect_msg(input logic [15:0] m, input longint max_cyc, input string what);
    longint t;
    t = 0;
    while (msg_q.size() == 0 && t < max_cyc) begin @(negedge clk); t++; end
    if (msg_q.size() == 0) check(0, {what, ": no status message"});
    else begin
      logic [15:0] g;
      g = msg_q.pop_front();
      check(g == m, $sformatf("%s: got %h expected %h", what, g, m));
    end
  endtask

  longint t_flush_end, t_ro_start, t_ro_end, t_fall = 0, t_rise = 0;
  bit busy_d = 0;
  always @(negedge clk) begin
    if (busy_d && !csg_busy) t_fall = cyc;
    if (!busy_d && csg_busy) t_rise = cyc;
    busy_d = csg_busy;
  end

  initial begin
    cmd_rx = 1;
    foreach (ae_regs[i]) ae_regs[i] = 8'h00;
    repeat (5) @(negedge clk);
    por_n = 1;
    wait (sys_reset_n);
    check(default_mode, "default mode after power-on");
    // flush of block 0
    wait (csg_busy);
    check(ae_regs[0] == 8'h88 && ae_regs[4] == 8'h0F, "PROM analogue set-up");
    expect_msg({ST_EOSEQ, 8'd0}, 2_000_000, "end of flush");
    wait (!csg_busy); repeat (2) @(negedge clk); t_flush_end = t_fall;
    // integration, then readout of block 1
    wait (csg_busy); repeat (2) @(negedge clk); t_ro_start = t_rise;
    check(t_ro_start - t_flush_end >= INTEG && t_ro_start - t_flush_end < INTEG + 100,
          $sformatf("integration of %0d cycles", t_ro_start - t_flush_end));
    $display("integration done, readout running");
    expect_msg({ST_EOSEQ, 8'd1}, 40_000_000, "end of readout");
    wait (!csg_busy); repeat (2) @(negedge clk); t_ro_end = t_fall;
    // 512 x (6 line clock steps of 2 us + 1074 pixels of 2 us) plus at most
    // 256 clocks of loop and group-change instructions per line
    check(t_ro_end - t_ro_start > 512 * (384 + 1074 * 64) && t_ro_end - t_ro_start < 512 * (384 + 1074 * 64 + 256),
          $sformatf("readout of %0d cycles", t_ro_end - t_ro_start));
    $display("readout took %0d cycles", t_ro_end - t_ro_start);
    // ICU leaves default mode during the gap
    send_byte(8'h41);
    expect_msg({ST_ACK_ERR, ACK_OK}, 100_000, "Exit default ACK");
    check(!default_mode, "idle mode after Exit default");
    repeat (400_000) @(negedge clk);
    check(!csg_busy, "no readout after Exit default");
    check(n_eof == 1, "one end of frame");
    check(bad_chars == 0, $sformatf("%0d wrong science characters", bad_chars));
    check(conv_n == longint'(LINES) * PIX, $sformatf("%0d pixel conversions", conv_n));
    check(bad_period == 0, $sformatf("%0d pixel periods not 2 us", bad_period));
    check(msg_q.size() == 0 && st_ferr == 0, "no further status messages");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (340_000_000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
