// tb_cmd_interpreter: checks the ROE command interpreter against the command
// and status tables.
//
// Models of the CSG RAM (random grant delays), the analogue bus, the HK ADC and
// a status link with random back-pressure surround the interpreter. The test
// checks, in default mode, that ICU commands other than Exit default are
// neither executed nor answered while PROM commands are executed silently;
// then, in idle mode, every command: Exit default, Start CSG, CSG Sig, Program
// CSG Windows, Dump CSG, Setup AE, Set up CSG, HK request, Dump AE parameter
// (including the SEU counter), an unknown header (NACK 0x01), a time-out
// (NACK 0xFF) and Reset. RAM contents, analogue register writes, CSG pulses
// and the exact status bytes are compared with expectations built here.
module tb_cmd_interpreter;
  import roe_pkg::*;
  localparam int TO = 2000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] in_data; logic in_valid, in_prom, in_ready, default_mode, hard_rst;
  logic csg_start; logic [5:0] csg_block; logic [1:0] csg_sig;
  logic ram_req, ram_we, ram_bank, ram_gnt, ram_rvalid; logic [16:0] ram_addr;
  logic [7:0] ram_wdata, ram_rdata, seu_count;
  logic ae_req, ae_we, ae_done; logic [5:0] ae_addr; logic [7:0] ae_wdata, ae_rdata;
  logic hk_req, hk_done; logic [5:0] hk_id; logic [7:0] hk_data;
  status_msg_t st_msg; logic st_valid, st_ready;

  cmd_interpreter #(.TIMEOUT_CYC(TO)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] mem [2][logic [16:0]];
  logic [7:0] aeregs [64];
  int n_start = 0, n_hard = 0, n_sig [2] = '{0, 0}, n_aew = 0;
  logic [5:0] last_block;
  status_msg_t rep_q[$];

  // RAM model: grant at random, read data one cycle after the grant
  always @(negedge clk) begin
    ram_gnt = ram_req && ($urandom % 2);
    st_ready = ($urandom % 4) != 0;
  end
  always @(posedge clk) begin
    ram_rvalid <= 0;
    if (ram_gnt) begin
      if (ram_we) mem[ram_bank][ram_addr] = ram_wdata;
      else begin
        ram_rdata <= mem[ram_bank].exists(ram_addr) ? mem[ram_bank][ram_addr] : 8'h00;
        ram_rvalid <= 1;
      end
    end
  end
  // analogue bus model: done 5 cycles after the request
  int ae_t = -1; logic ae_w; logic [5:0] ae_a; logic [7:0] ae_d;
  always @(posedge clk) begin
    ae_done <= 0;
    if (!rst_n) ae_t = -1;                    // flops are random before reset
    else if (ae_req) begin ae_t = 5; ae_w = ae_we; ae_a = ae_addr; ae_d = ae_wdata; end
    else if (ae_t > 0) ae_t--;
    else if (ae_t == 0) begin
      if (ae_w) begin aeregs[ae_a] = ae_d; n_aew++; end
      else ae_rdata <= aeregs[ae_a];
      ae_done <= 1; ae_t = -1;
    end
  end
  // HK model
  int hk_t = -1;
  always @(posedge clk) begin
    hk_done <= 0;
    if (hk_req) hk_t = 30;
    else if (hk_t > 0) hk_t--;
    else if (hk_t == 0) begin hk_data <= 8'(hk_id * 3 + 1); hk_done <= 1; hk_t = -1; end
  end
  // event counters
  always @(negedge clk) begin
    if (csg_start) begin n_start++; last_block = csg_block; end
    if (hard_rst) n_hard++;
    if (csg_sig[0]) n_sig[0]++;
    if (csg_sig[1]) n_sig[1]++;
    if (st_valid && st_ready) rep_q.push_back(st_msg);
  end

  task automatic send(input logic [7:0] b, input logic prom);
    @(negedge clk);
    in_data = b; in_valid = 1; in_prom = prom;
    #1; while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk); in_valid = 0;
  endtask

  task automatic cmd(input logic [7:0] bytes [$], input logic prom);
    foreach (bytes[i]) send(bytes[i], prom);
    repeat (60) @(negedge clk);
  endtask

  task automatic expect_reply(input logic [7:0] id, input logic [7:0] d, input string what);
    checks++;
    if (rep_q.size() != 1) begin failures++; $display("%s: %0d replies", what, rep_q.size()); end
    else if (rep_q[0].id != id || rep_q[0].data != d) begin
      failures++; $display("%s: reply %h %h exp %h %h", what, rep_q[0].id, rep_q[0].data, id, d);
    end
    rep_q.delete();
  endtask

  task automatic expect_none(input string what);
    checks++;
    if (rep_q.size() != 0) begin failures++; $display("%s: unexpected reply %h", what, rep_q[0]); end
    rep_q.delete();
  endtask

  initial begin
    logic [7:0] blk [$];
    in_valid = 0; in_prom = 0; in_data = 0; seu_count = 8'h2C; ram_rdata = 0; ae_rdata = 0; hk_data = 0;
    for (int i = 0; i < 64; i++) aeregs[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    checks++; if (!default_mode) begin failures++; $display("not in default mode after reset"); end

    // ---- default mode: ICU commands ignored
    cmd('{8'h42, 8'h05}, 0);
    cmd('{8'h55}, 0);
    cmd('{8'h40}, 0);
    cmd('{8'h46, 8'h01, 8'h00, 8'h41}, 0);     // partial command containing 0x41 as data
    repeat (TO + 100) @(negedge clk);          // time-out: silently dropped in default mode
    expect_none("default mode ICU");
    checks++; if (n_start != 0 || n_hard != 0 || !default_mode) begin failures++; $display("executed in default mode"); end

    // ---- default mode: PROM commands executed silently
    blk = '{8'h46, 8'h81, 8'h03};
    for (int i = 0; i < 64; i++) blk.push_back(8'(i * 7 + 1));
    cmd(blk, 1);
    cmd('{8'h45, 8'h11, 8'h22, 8'h33, 8'h44, 8'h55, 8'h66, 8'h77, 8'h88}, 1);
    expect_none("PROM");
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (!mem[1].exists({6'd1, 5'd3, 6'(i)}) || mem[1][{6'd1, 5'd3, 6'(i)}] != 8'(i * 7 + 1)) begin
        failures++; $display("CSG RAM byte %0d", i);
      end
    end
    checks++; if (n_aew != 7 || aeregs[0] != 8'h11 || aeregs[6] != 8'h77) begin failures++; $display("AE writes %0d", n_aew); end

    // ---- exit default
    cmd('{8'h41}, 0);
    expect_reply(8'h03, 8'h00, "exit default");
    checks++; if (default_mode) begin failures++; $display("still default"); end

    cmd('{8'h50}, 0);                           expect_reply(8'h03, 8'h01, "bad header");
    cmd('{8'h42, 8'hC7}, 0);                    expect_reply(8'h03, 8'h00, "start");
    checks++; if (n_start != 1 || last_block != 6'd7) begin failures++; $display("start %0d blk %0d", n_start, last_block); end
    cmd('{8'h48, 8'h01}, 0);                    expect_reply(8'h03, 8'h00, "sig1");
    cmd('{8'h48, 8'h00}, 0);                    expect_reply(8'h03, 8'h00, "sig0");
    checks++; if (n_sig[0] != 1 || n_sig[1] != 1) begin failures++; $display("sigs"); end
    cmd('{8'h44, 8'h03, 8'h02, 8'h05, 8'hAB}, 0); expect_reply(8'h03, 8'h00, "window");
    checks++; if (mem[0][{6'd3, 5'd2, 6'd5}] != 8'hAB) begin failures++; $display("window write"); end
    cmd('{8'h43, 8'h03, 8'h02, 8'h05}, 0);      expect_reply(8'h30, 8'hAB, "dump prog");
    cmd('{8'h43, 8'h81, 8'h03, 8'h0A}, 0);      expect_reply(8'h30, 8'(10 * 7 + 1), "dump pat");
    cmd('{8'h45, 8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08}, 0);
    expect_reply(8'h03, 8'h00, "setup AE");
    cmd('{8'h49, 8'h03}, 0);                    expect_reply(8'hC0, 8'h04, "dump AE 3");
    cmd('{8'h49, 8'h07}, 0);                    expect_reply(8'hC0, 8'h2C, "dump AE SEU");
    cmd('{8'h47, 8'h1A}, 0);                    expect_reply(8'hC0, 8'(26 * 3 + 1), "HK");
    blk = '{8'h46, 8'h02, 8'h1F};
    for (int i = 0; i < 64; i++) blk.push_back(8'(255 - i));
    cmd(blk, 0);                                expect_reply(8'h03, 8'h00, "setup CSG");
    checks++; if (mem[0][{6'd2, 5'd31, 6'd63}] != 8'd192) begin failures++; $display("setup CSG data"); end
    // time-out
    send(8'h42, 0);
    repeat (TO + 100) @(negedge clk);
    expect_reply(8'h03, 8'hFF, "timeout");
    checks++; if (n_start != 1) begin failures++; $display("timed-out start executed"); end
    // the link resynchronises on the next header
    cmd('{8'h42, 8'h02}, 0);                    expect_reply(8'h03, 8'h00, "start after timeout");
    cmd('{8'h40}, 0);
    expect_none("reset");
    checks++; if (n_hard != 1) begin failures++; $display("hard reset %0d", n_hard); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
