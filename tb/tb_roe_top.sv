// tb_roe_top: end-to-end test of the ROE digital board at reduced timing.
//
// The board runs with a 2 Mbaud command/status link (16 clocks per bit), a
// short default-mode PROM image (tb/prom_small.hex: analogue set-up, a 4-line
// flush program in block 0 and a 3-line x 5-pixel readout program with 2
// discarded pixels in block 1), and integration, gap, time-out and Period of
// Silence times of a few thousand clocks. Models around the board stand for
// the ICU (command UART driver, status UART decoder, science link receiver),
// the analogue chains (an ADC that answers every CONVST_N with four pixel
// words), the analogue PCB registers on the back-plane bus and the PSU
// housekeeping ADC.
//
// The test walks through the board's life: power-on default mode (PROM
// replay, flush, integration, readout, gap, readout), ICU commands ignored in
// default mode, Exit default, bad header, time-out, HK request, analogue
// set-up and dump, CSG programming and dump, a CSG program that waits in a
// JBOS loop for a CSG Sig command while driving the charge pump from the
// sequence, an ECC-corrected readout after bits of both RAMs are flipped,
// a science link overflow and finally a Reset command that returns to default
// mode. Every science character is compared with the pixel words the ADC
// model produced, in order, and every status message with its expected value.
// Each mechanism is counted; one that never happened is a failure.
module tb_roe_top;
  import roe_pkg::*;
  localparam int DIV = 16, TO = 4000, INTEG = 3000, GAP = 800, POS = 400;
  localparam int LINES = 3, PIX = 5;

  logic clk = 0, por_n = 0;
  always #5 clk = ~clk;

  logic cmd_rx, status_tx, sci_data, sci_strobe, adc_valid;
  logic [13:0] adc_data [4];
  logic sys_reset_n, bp_d_oe, bp_wr_en, bp_rd_en;
  logic [5:0] bp_a; logic [7:0] bp_d_out, bp_d_in;
  logic [6:0] hk_mux_sel; logic hk_conv_start_n, hk_shut_down_n, hk_oe_n, hk_data_rdy;
  logic convst_n, clamp_n, isolate, shut_down_n, stim_r, stim_l, eos, v15_on, chrg_pump;
  ccd_clk_t ccd; logic default_mode, csg_busy;

  roe_top #(.BAUD(32_000_000 / DIV), .TIMEOUT_CYC(TO), .INTEG_CYC(INTEG), .GAP_CYC(GAP),
            .TX_POS_CYC(POS), .HK_SETTLE(20), .PROM_FILE("tb/prom_small.hex")) dut (.*);

  int checks = 0, failures = 0;
  int mech [string];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- analogue PCB register and HK ADC models ----------------
  logic [7:0] ae_regs [64];
  logic wr_d;
  int   hk_t;
  always @(posedge clk) begin
    wr_d <= bp_wr_en;
    if (wr_d && !bp_wr_en) begin ae_regs[bp_a] <= bp_d_out; mech["ae_write"]++; end
    if (!sys_reset_n) hk_t <= -1;
    else if (!hk_conv_start_n && hk_t < 0) hk_t <= 37;
    else if (hk_t > 0) hk_t <= hk_t - 1;
    if (!hk_oe_n) hk_t <= -1;
  end
  assign hk_data_rdy = (hk_t == 0);
  assign bp_d_in = !hk_oe_n ? 8'(hk_mux_sel * 3 + 7) : bp_rd_en ? ae_regs[bp_a] : 8'h00;

  // ---------------- ADC model: four pixel words per CONVST_N ---------------
  logic [15:0] exp_q [$];
  int  pix_n = 0, adc_t = -1, inj = 0;
  bit  conv_d = 1, chk_chars = 1;
  always @(negedge clk) begin
    adc_valid = 0;
    if (sys_reset_n && conv_d && !convst_n) adc_t = 10;
    conv_d = convst_n;
    if (adc_t == 0) begin
      for (int k = 0; k < 4; k++) begin
        adc_data[k] = 14'((pix_n * 4 + k) * 37);
        if (chk_chars) exp_q.push_back({2'(k), adc_data[k]});
      end
      adc_valid = 1; pix_n++;
    end
    if (adc_t >= 0) adc_t--;
    if (inj > 0) begin                      // back-to-back words for the overflow test
      adc_data = '{14'd1, 14'd2, 14'd3, 14'd4};
      adc_valid = 1; inj--;
    end
  end

  // ---------------- ICU science link receiver -------------------------------
  logic [15:0] char_data; logic char_valid, sci_eof, sci_err; logic [7:0] eof_data;
  int n_chars = 0, n_eof = 0;
  sci_link_rx #(.POS(300)) u_sci_rx (.clk, .sd(sci_data), .ss(sci_strobe), .char_data,
                                     .char_valid, .eof_data, .eof(sci_eof), .err(sci_err));
  always @(negedge clk) begin
    if (char_valid && chk_chars) begin
      n_chars++;
      if (exp_q.size() == 0) check(0, $sformatf("unexpected science char %h", char_data));
      else check(char_data == exp_q.pop_front(), $sformatf("science char %h", char_data));
    end
    if (sci_eof) begin
      n_eof++; mech["science_eof"]++;
      check(eof_data == 8'hCC, "end of frame character 0xCC");
      check(exp_q.size() == 0, "all pixels sent before end of frame");
    end
    if (dut.u_sci.overflow) mech["science_overflow"]++;
  end

  // ---------------- ICU status receiver --------------------------------------
  logic [7:0] st_byte; logic st_valid; int st_ferr;
  uart_mon #(.DIV(DIV)) u_st_mon (.clk, .line(status_tx), .data(st_byte), .valid(st_valid),
                                  .frame_err(st_ferr));
  logic [15:0] msg_q [$], eos_q [$];
  logic [7:0]  first_b; bit have_first = 0;
  always @(negedge clk) if (st_valid) begin
    if (!have_first) begin first_b = st_byte; have_first = 1; end
    else begin
      have_first = 0;
      if (first_b == ST_EOSEQ) eos_q.push_back({first_b, st_byte});
      else msg_q.push_back({first_b, st_byte});
    end
  end

  // ---------------- measurements ---------------------------------------------
  int busy_low_len [$];
  int low_t = -1;
  bit busy_d = 0;
  int cp_half = 0, cp_last = 0; bit cp_d = 0, sync_d = 0, mode_d = 0;
  always @(negedge clk) begin
    if (sys_reset_n && default_mode) begin
      if (busy_d && !csg_busy) low_t = 0;
      else if (!csg_busy && low_t >= 0) low_t++;
      if (!busy_d && csg_busy && low_t > 0) busy_low_len.push_back(low_t);
    end
    busy_d = csg_busy;
    // charge pump: free-running 500 kHz (half period 32) or following CHRG_SYNC
    if (!sys_reset_n || mode_d != dut.line_pat[LN_CHRG_PMP]) begin
      cp_last = 0; cp_half = 0;           // restart the measurement on a mode change
    end else begin
      if (!dut.line_pat[LN_CHRG_PMP]) begin
        if (chrg_pump != cp_d) begin
          if (cp_last >= 2) begin   // the first two edges after a mode change are partial
            check(cp_half == 32, $sformatf("charge pump half period %0d", cp_half));
            mech["pump_oscillator"]++;
          end
          cp_half = 0; cp_last++;
        end
        cp_half++;
      end else begin
        check(chrg_pump == sync_d, "charge pump follows CHRG_SYNC");
        if (chrg_pump != cp_d) mech["pump_sync"]++;
        cp_last = 0; cp_half = 0;
      end
    end
    cp_d = chrg_pump; sync_d = dut.row_pat[ROW_CHRG_SYNC]; mode_d = dut.line_pat[LN_CHRG_PMP];
  end
  always @(negedge clk) if (dut.u_ram.do_wb) mech["ecc_write_back"]++;

  // ---------------- ICU command driver ---------------------------------------
  task automatic send_byte(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      cmd_rx = f[i];
      repeat (DIV) @(negedge clk);
    end
  endtask
  task automatic send(input logic [7:0] b []);
    foreach (b[i]) send_byte(b[i]);
  endtask
  task automatic expect_msg(input logic [7:0] id, input logic [7:0] data, input string what);
    int t;
    t = 0;
    while (msg_q.size() == 0 && t < 20000) begin @(negedge clk); t++; end
    if (msg_q.size() == 0) check(0, {what, ": no status message"});
    else begin
      logic [15:0] m;
      m = msg_q.pop_front();
      check(m == {id, data}, $sformatf("%s: got %h expected %h%h", what, m, id, data));
    end
  endtask
  task automatic expect_eos(input logic [7:0] blk, input int max_cyc);
    int t;
    t = 0;
    while (eos_q.size() == 0 && t < max_cyc) begin @(negedge clk); t++; end
    if (eos_q.size() == 0) check(0, $sformatf("no end of sequence for block %0d", blk));
    else begin
      logic [15:0] m;
      m = eos_q.pop_front();
      check(m == {ST_EOSEQ, blk}, $sformatf("end of sequence %h expected block %0d", m, blk));
      mech["end_of_sequence"]++;
    end
  endtask
  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  // CSG assembler helpers for the test program
  function automatic logic [15:0] ins(input logic [4:0] op, input logic [10:0] d);
    return {op, d};
  endfunction

  localparam logic [10:0] IDLE_L = 11'h004;   // I3 phase high (active-low I1, I2 low)
  logic [15:0] prog [64];
  logic [7:0]  pkt [];
  int          c0;
  string needed [] = '{"default_flush", "default_readout", "integration", "gap", "ignored_in_default",
                       "exit_default", "bad_header", "timeout", "hk_read", "ae_write", "ae_read",
                       "csg_ram_dump", "jbos_loop", "csg_signal_break", "end_of_sequence", "science_eof",
                       "seu_corrected", "ecc_write_back", "science_overflow", "pump_oscillator",
                       "pump_sync", "hard_reset"};

  initial begin
    cmd_rx = 1;
    foreach (ae_regs[i]) ae_regs[i] = 8'h00;
    wr_d = 0;
    repeat (5) @(negedge clk);
    por_n = 1;

    // ===== default mode after power-on ===================================
    wait (sys_reset_n);
    check(default_mode, "default mode after power-on");
    expect_eos(8'd0, 40000); mech["default_flush"]++;
    check(ae_regs[0] == 8'h88 && ae_regs[3] == 8'h3C && ae_regs[4] == 8'h0F,
          "PROM analogue set-up written to the analogue PCB");
    // an ICU command other than Exit default is ignored in default mode
    send('{8'h47, 8'h05});
    expect_eos(8'd1, 40000); mech["default_readout"]++;
    expect_eos(8'd1, 40000); mech["default_readout"]++;
    check(msg_q.size() == 0, "no reply in default mode");
    if (msg_q.size() == 0) mech["ignored_in_default"]++;
    check(n_chars == 2 * LINES * PIX * 4, $sformatf("default readouts sent %0d chars", n_chars));
    check(busy_low_len.size() >= 2, "default cycle idle periods measured");
    if (busy_low_len.size() >= 2) begin
      check(busy_low_len[0] >= INTEG && busy_low_len[0] < INTEG + 50,
            $sformatf("integration %0d cycles", busy_low_len[0]));
      check(busy_low_len[1] >= GAP && busy_low_len[1] < GAP + 50,
            $sformatf("gap %0d cycles", busy_low_len[1]));
      mech["integration"]++; mech["gap"]++;
    end

    // ===== Exit default ====================================================
    send('{8'h41});
    expect_msg(ST_ACK_ERR, ACK_OK, "Exit default ACK");
    check(!default_mode, "idle mode after Exit default");
    mech["exit_default"]++;
    while (csg_busy) @(negedge clk);
    idle(INTEG + 2000);
    check(!csg_busy, "no default cycle after Exit default");
    while (eos_q.size() != 0) void'(eos_q.pop_front());
    exp_q.delete();
    pix_n = 0;

    // ===== errors ============================================================
    send('{8'h55});
    expect_msg(ST_ACK_ERR, ERR_BAD_HDR, "bad header");
    mech["bad_header"]++;
    send('{8'h44, 8'h00});
    idle(TO + 100);
    expect_msg(ST_ACK_ERR, ERR_TIMEOUT, "time-out");
    mech["timeout"]++;

    // ===== HK and analogue bus ==============================================
    send('{8'h47, 8'h05});
    expect_msg(ST_HK_AE, 8'd22, "HK channel 5");
    mech["hk_read"]++;
    send('{8'h49, 8'h03});
    expect_msg(ST_HK_AE, 8'h3C, "AE dump parameter 3");
    send('{8'h45, 8'h11, 8'h22, 8'h33, 8'h44, 8'h55, 8'h66, 8'h77, 8'h00});
    expect_msg(ST_ACK_ERR, ACK_OK, "Setup AE ACK");
    send('{8'h49, 8'h06});
    expect_msg(ST_HK_AE, 8'h77, "AE dump parameter 6");
    mech["ae_read"]++;

    // ===== CSG program in block 2: JBOS wait loop driving the charge pump ====
    prog = '{default: 16'h0000};
    prog[0] = ins(5'b00110, 11'h400);                    // LDWL line, dwell 0
    prog[1] = ins(5'b11111, IDLE_L | 11'h200);           // line: CHRG_PMP on
    prog[2] = ins(5'b00110, 11'h001);                    // LDWL row, dwell 1
    prog[3] = ins(5'b01010, 11'h000);                    // LDSIG0J
    prog[4] = ins(5'b11111, 11'h4FF);                    // row: CHRG_SYNC high
    prog[5] = ins(5'b11100, 11'h0FF);                    // JBOS0, row: CHRG_SYNC low
    prog[6] = ins(5'b00110, 11'h400);                    // LDWL line
    prog[7] = ins(5'b11111, IDLE_L | 11'h040);           // end of readout
    prog[8] = ins(5'b00000, IDLE_L);                     // HALT
    for (int bank = 0; bank < 2; bank++) begin
      pkt = new[67];
      pkt[0] = 8'h46; pkt[1] = {1'(bank), 7'd2}; pkt[2] = 8'h00;
      for (int i = 0; i < 64; i++) pkt[3 + i] = bank == 0 ? prog[i][15:8] : prog[i][7:0];
      send(pkt);
      expect_msg(ST_ACK_ERR, ACK_OK, "Setup CSG ACK");
    end
    send('{8'h43, 8'h82, 8'h00, 8'h04});
    expect_msg(ST_DUMP_CSG, 8'hFF, "Dump CSG pattern byte");
    send('{8'h43, 8'h02, 8'h00, 8'h05});
    expect_msg(ST_DUMP_CSG, 8'hE0, "Dump CSG program byte");
    send('{8'h44, 8'h82, 8'h00, 8'h3C, 8'h5A});
    expect_msg(ST_ACK_ERR, ACK_OK, "Program window ACK");
    send('{8'h43, 8'h82, 8'h00, 8'h3C});
    expect_msg(ST_DUMP_CSG, 8'h5A, "Dump of window byte");
    mech["csg_ram_dump"]++;

    send('{8'h42, 8'h02});
    expect_msg(ST_ACK_ERR, ACK_OK, "Start CSG ACK");
    idle(3000);
    check(csg_busy, "CSG waits in JBOS loop");
    if (csg_busy) mech["jbos_loop"]++;
    send('{8'h48, 8'h00});
    expect_msg(ST_ACK_ERR, ACK_OK, "CSG Sig ACK");
    expect_eos(8'd2, 2000);
    idle(20);
    check(!csg_busy, "CSG halted after signal");
    mech["csg_signal_break"]++;

    // ===== ECC: flip one bit in each RAM of the readout block, then read out ==
    dut.u_ram.prog_mem[(1 << 11) | 5][6] = ~dut.u_ram.prog_mem[(1 << 11) | 5][6];
    dut.u_ram.pat_mem[(1 << 11) | 20][2] = ~dut.u_ram.pat_mem[(1 << 11) | 20][2];
    c0 = n_chars;
    send('{8'h42, 8'h01});
    expect_msg(ST_ACK_ERR, ACK_OK, "Start readout ACK");
    expect_eos(8'd1, 40000);
    idle(1000);
    check(n_chars - c0 == LINES * PIX * 4, $sformatf("readout with ECC sent %0d chars", n_chars - c0));
    send('{8'h49, 8'h07});
    expect_msg(ST_HK_AE, 8'd2, "SEU counter");
    if (dut.u_ram.seu_count == 2) mech["seu_corrected"]++;
    check(ham_syndrome(dut.u_ram.prog_mem[(1 << 11) | 5]) == 0 &&
          ham_syndrome(dut.u_ram.pat_mem[(1 << 11) | 20]) == 0, "corrected words written back");

    // ===== science link overflow: pixels faster than the link ================
    idle(2 * POS);
    chk_chars = 0;
    inj = 4;
    idle(1000);
    chk_chars = 1;

    // ===== Reset command: back to default mode ================================
    send('{8'h40});
    idle(10);
    check(default_mode, "default mode after Reset command");
    if (default_mode) mech["hard_reset"]++;
    expect_eos(8'd0, 40000);
    check(msg_q.size() == 0, "no reply to Reset");

    check(st_ferr == 0, "status link framing");
    foreach (mech[k]) $display("mechanism %-20s happened %0d times", k, mech[k]);
    foreach (needed[i]) begin
      checks++;
      if (!mech.exists(needed[i])) begin failures++; $display("FAIL mechanism %s never happened", needed[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
