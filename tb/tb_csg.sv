// tb_csg: checks the clock sequence generator as a whole.
//
// A program memory model holds a block that re-programs two de-multiplexer
// selectors (CCD A image clock 1 forced to '0', CCD B serial clock 1 right
// taken from R2), outputs row and line patterns, sets the end-of-readout bit
// and halts. The test checks the CCD clock outputs produced from the pattern
// registers through the selectors, and that the end-of-sequence status
// message (0x0C, block number) is offered once and held until accepted.
module tb_csg;
  import roe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start; logic [5:0] start_block; logic [1:0] sig;
  logic ram_rd, ram_err; logic [16:0] ram_addr; logic [7:0] ram_prog, ram_pat;
  logic [10:0] row_pat, line_pat; ccd_clk_t ccd; logic busy;
  status_msg_t eos_msg; logic eos_valid, eos_ready;
  int checks = 0, failures = 0, n_msg = 0;
  logic [15:0] mem [64];

  csg dut (.*);

  always @(posedge clk) begin
    ram_err <= 0;
    if (ram_rd) {ram_prog, ram_pat} <= mem[ram_addr[5:0]];
  end
  always @(negedge clk) if (eos_valid && eos_ready) begin
    n_msg++; checks++;
    if (eos_msg.id != 8'h0C || eos_msg.data != 8'd9) begin failures++; $display("eos msg %h", eos_msg); end
  end

  task automatic chk(input logic got, input logic exp, input string what);
    checks++; if (got !== exp) begin failures++; $display("%s got %b exp %b", what, got, exp); end
  endtask

  initial begin
    mem = '{default: 16'hF800};
    // CTRL3 = reg bits 43..33: I1 A selector (bits 1:0) = 00, others reset "01"
    mem[0] = {5'b00100, 11'b101_0101_0100};
    // CTRL0: R1 right B (bits 5:4) = "10" -> R2 of the row group
    mem[1] = {5'b00001, 11'b010_0110_0101};
    mem[2] = {5'b00110, 11'h000};                 // row group, dwell 0
    mem[3] = {5'b11111, 11'b000_1101_0110};       // row: r1_n=0, r2_n=1, r3_n=1, rr_n=0 ...
    mem[4] = {5'b00110, 11'h400};                 // line group
    mem[5] = {5'b11111, 11'b000_0000_1011};       // line: i1_n=1, i2_n=1, i3_n=0, dg_n=1
    mem[6] = {5'b11111, 11'b000_0100_1011};       // + end of readout
    mem[7] = {5'b00000, 11'b000_0000_1011};       // HALT, outputs the final line pattern
    start = 0; start_block = 0; sig = 0; eos_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; start_block = 6'd9; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    // row outputs through the selectors
    chk(ccd.r1l_n[0], 1'b0, "R1 left A = R1");
    chk(ccd.r1r_n[1], 1'b1, "R1 right B = R2");
    chk(ccd.r2r_n[0], 1'b1, "R2 right A = R2");
    chk(ccd.r3_n[1],  1'b1, "R3 B");
    chk(ccd.rr_n[0],  1'b0, "RR A");
    // line outputs
    chk(ccd.i1_n[0],  1'b0, "I1 A forced 0");
    chk(ccd.i1_n[1],  1'b1, "I1 B = I1");
    chk(ccd.i2_n[0],  1'b1, "I2 A");
    chk(ccd.dg_n[1],  1'b1, "DG B");
    chk(line_pat[LN_RDOUT], 1'b0, "HALT cleared end of readout");
    checks++; if (!eos_valid) begin failures++; $display("no eos message"); end
    repeat (20) @(negedge clk);
    checks++; if (!eos_valid) begin failures++; $display("eos message not held"); end
    eos_ready = 1; repeat (3) @(negedge clk);
    checks++; if (n_msg != 1 || eos_valid) begin failures++; $display("messages %0d", n_msg); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
