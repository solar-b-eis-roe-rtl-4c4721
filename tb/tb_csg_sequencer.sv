// tb_csg_sequencer: self-checking test of the CSG micro-program sequencer.
//
// A behavioural program memory answers the sequencer's fetches one cycle
// later. The test program selects the row group with dwell 0, loads a control
// register, runs a three-pass LOAD1/DJNZ1 loop, switches to the line group with
// dwell 2, spins in an LDSIG0J/JBOS0 loop until SIG0 is sent, raises the
// end-of-flush bit and halts. The checker compares every pattern update and
// the cycles between updates with values worked out here: 4 cycles per
// instruction, (n+1) x 4 cycles for output instructions, plus a 4-cycle pause
// after a fetch flagged as corrected.
module tb_csg_sequencer;
  import roe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start; logic [5:0] start_block; logic [1:0] sig;
  logic ram_rd; logic [16:0] ram_addr; logic [7:0] ram_prog, ram_pat; logic ram_err;
  logic [10:0] row_pat, line_pat; logic [54:0] ctrl; logic busy, eoseq, upd; logic [5:0] block;

  csg_sequencer dut (.*);

  logic [15:0] mem [64];
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [15:0] I(input logic [4:0] op, input logic [10:0] d);
    return {op, d};
  endfunction

  // memory model with one fault injection on the first fetch of address 4
  bit injected = 0;
  always @(posedge clk) begin
    ram_err <= 1'b0;
    if (ram_rd) begin
      if (ram_addr[16:11] != 6'd3) begin failures++; $display("bad block fetch %h", ram_addr); end
      {ram_prog, ram_pat} <= mem[ram_addr[5:0]];
      if (ram_addr[10:0] == 11'd4 && !injected) begin ram_err <= 1'b1; injected = 1; end
    end
  end

  // expected updates
  typedef struct { bit line; logic [10:0] v; int gap; } exp_t;
  exp_t exp_q[$];
  int last_upd = -1, spins = 0, n_eoseq = 0;
  bit sig_sent = 0;

  always @(posedge clk) if (rst_n) begin
    if (eoseq) n_eoseq++;
    if (upd) begin
      exp_t e;
      // the update is visible in the register one cycle after upd rises
      if (exp_q.size() == 0) begin failures++; $display("unexpected update"); end
      else begin
        e = exp_q.pop_front();
        #1;
        checks++;
        if ((e.line ? line_pat : row_pat) != e.v) begin
          failures++; $display("upd value %h exp %h (line=%0d)", e.line ? line_pat : row_pat, e.v, e.line);
        end
        if (last_upd >= 0 && e.gap > 0) begin
          checks++;
          if (cyc - last_upd != e.gap) begin failures++; $display("gap %0d exp %0d (v=%h)", cyc - last_upd, e.gap, e.v); end
        end
        last_upd = cyc;
      end
    end
  end

  initial begin
    // program (block 3)
    mem = '{default: 16'hF800};
    mem[0]  = I(OP_LDWL, 11'h000);             // row group, dwell 0
    mem[1]  = I(OP_CTRL0, 11'h123);
    mem[2]  = {4'b1001, 12'd3};                // LOAD1 3
    mem[3]  = I(OP_NOP,   11'h001);
    mem[4]  = I(OP_DJNZ1, 11'h002);
    mem[5]  = I(OP_LDWL,  11'h402);            // line group, dwell 2
    mem[6]  = I(OP_LDSIG0J, 11'h0);
    mem[7]  = I(OP_NOP,   11'h010);
    mem[8]  = I(OP_JBOS0, 11'h020);
    mem[9]  = I(OP_NOP,   11'h080);            // end of flush bit
    mem[10] = I(OP_HALT,  11'h000);
    // expected row updates: 3 passes; the first DJNZ fetch is paused 4 cycles
    exp_q.push_back('{0, 11'h001, 0});
    exp_q.push_back('{0, 11'h002, 8});
    exp_q.push_back('{0, 11'h001, 4});
    exp_q.push_back('{0, 11'h002, 4});
    exp_q.push_back('{0, 11'h001, 4});
    exp_q.push_back('{0, 11'h002, 4});
    // line updates with dwell 2: 12 cycles each; LDWL + LDSIG0J add 8 cycles
    exp_q.push_back('{1, 11'h010, 8 + 12});
    exp_q.push_back('{1, 11'h020, 12});
    for (int i = 0; i < 3; i++) begin
      exp_q.push_back('{1, 11'h010, 12});
      exp_q.push_back('{1, 11'h020, 12});
    end
    exp_q.push_back('{1, 11'h080, 12});
    exp_q.push_back('{1, 11'h000, 12});

    start = 0; start_block = 0; sig = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    checks++; if (busy || row_pat != 11'h0DF || ctrl != CTRL_RESET) begin failures++; $display("reset state"); end
    start <= 1; start_block <= 6'd3;
    @(posedge clk); start <= 0;
    // wait for the 4th JBOS pattern, then send SIG0
    wait (exp_q.size() == 3);
    @(posedge clk); sig <= 2'b01; @(posedge clk); sig <= 0;
    wait (!busy);
    repeat (5) @(posedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d updates missing", exp_q.size()); end
    checks++; if (ctrl[10:0] != 11'h123) begin failures++; $display("ctrl0 %h", ctrl[10:0]); end
    checks++; if (n_eoseq != 1) begin failures++; $display("eoseq count %0d", n_eoseq); end
    checks++; if (block != 6'd3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
