// tb_ae_bus_if: checks register writes and reads on the analogue PCB bus.
//
// A behavioural model of the analogue board's register file latches D on the
// falling edge of WR_EN at address A and drives D while RD_EN is high. Random
// writes followed by read-backs must return the written values; the test also
// checks that the board never drives D during a read, and that WR_EN and
// RD_EN are never high together.
module tb_ae_bus_if;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req, we, busy, done; logic [5:0] addr; logic [7:0] wdata, rdata;
  logic [5:0] bp_a; logic [7:0] bp_d_out, bp_d_in; logic bp_d_oe, bp_wr_en, bp_rd_en;
  int checks = 0, failures = 0;
  logic [7:0] regs [64];
  logic wr_d;

  ae_bus_if dut (.*);

  // analogue board model
  always @(posedge clk) begin
    wr_d <= bp_wr_en;
    if (rst_n && wr_d && !bp_wr_en) regs[bp_a] <= bp_d_out;
    if (rst_n && bp_wr_en && bp_rd_en) begin failures++; $display("both strobes"); end
    if (rst_n && bp_rd_en && bp_d_oe) begin failures++; $display("contention"); end
  end
  assign bp_d_in = bp_rd_en ? regs[bp_a] : 8'hZZ & 8'h00;

  task automatic access(input logic w, input logic [5:0] a, input logic [7:0] d, output logic [7:0] r);
    @(negedge clk); req = 1; we = w; addr = a; wdata = d;
    @(negedge clk); req = 0;
    while (!done) @(negedge clk);
    r = rdata;
  endtask

  initial begin
    logic [7:0] v [8]; logic [7:0] r;
    req = 0; we = 0; addr = 0; wdata = 0; wr_d = 0;
    for (int i = 0; i < 64; i++) regs[i] = 8'h00;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int round = 0; round < 5; round++) begin
      for (int i = 0; i < 8; i++) begin v[i] = 8'($urandom); access(1, 6'(i), v[i], r); end
      for (int i = 0; i < 8; i++) begin
        access(0, 6'(i), 8'h00, r);
        checks++; if (r != v[i]) begin failures++; $display("reg %0d got %h exp %h", i, r, v[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
