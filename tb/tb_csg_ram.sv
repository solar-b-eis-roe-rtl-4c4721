// tb_csg_ram: self-checking test of the ECC-protected CSG program/pattern RAM.
//
// Writes random bytes into both banks through the host port, reads them back
// through the host and the sequencer ports, then flips single stored bits and
// checks that the read data are corrected, seq_err / the SEU counter report
// each corrected word, the corrected word is written back into the array and
// that a sequencer fetch takes priority over a host request in the same cycle.
module tb_csg_ram;
  import roe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic seq_rd; logic [16:0] seq_addr; logic [7:0] seq_prog, seq_pat; logic seq_valid, seq_err;
  logic host_req, host_we, host_bank; logic [16:0] host_addr; logic [7:0] host_wdata;
  logic host_gnt; logic [7:0] host_rdata; logic host_rvalid; logic [7:0] seu_count;

  csg_ram dut (.*);

  int checks = 0, failures = 0;
  logic [16:0] addrs [16];
  logic [7:0]  pd [16], td [16];

  // stimulus changes on the falling edge; a grant seen then is taken at the next rising edge
  task automatic host_write(input logic bank, input logic [16:0] a, input logic [7:0] d);
    @(negedge clk);
    host_req = 1; host_we = 1; host_bank = bank; host_addr = a; host_wdata = d;
    #1; while (!host_gnt) begin @(negedge clk); #1; end
    @(negedge clk); host_req = 0; host_we = 0;
  endtask

  task automatic host_read(input logic bank, input logic [16:0] a, output logic [7:0] d);
    @(negedge clk);
    host_req = 1; host_we = 0; host_bank = bank; host_addr = a;
    #1; while (!host_gnt) begin @(negedge clk); #1; end
    @(negedge clk); host_req = 0;
    if (!host_rvalid) begin failures++; $display("no rvalid"); end
    d = host_rdata;
  endtask

  task automatic seq_read(input logic [16:0] a, output logic [7:0] p, output logic [7:0] t, output logic e);
    @(negedge clk);
    seq_rd = 1; seq_addr = a;
    @(negedge clk); seq_rd = 0;
    p = seq_prog; t = seq_pat; e = seq_err;
    if (!seq_valid) begin failures++; $display("no seq_valid"); end
  endtask

  initial begin
    logic [7:0] d, p, t; logic e; logic [7:0] cnt0;
    seq_rd = 0; seq_addr = 0; host_req = 0; host_we = 0; host_bank = 0; host_addr = 0; host_wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int i = 0; i < 16; i++) begin
      addrs[i] = {6'(i * 5), 11'($urandom)};
      pd[i] = 8'($urandom); td[i] = 8'($urandom);
      host_write(0, addrs[i], pd[i]);
      host_write(1, addrs[i], td[i]);
    end
    checks++; if (seu_count != 0) begin failures++; $display("seu after writes %0d", seu_count); end
    for (int i = 0; i < 16; i++) begin
      host_read(0, addrs[i], d); checks++; if (d != pd[i]) begin failures++; $display("host prog %h exp %h", d, pd[i]); end
      host_read(1, addrs[i], d); checks++; if (d != td[i]) begin failures++; $display("host pat %h exp %h", d, td[i]); end
      seq_read(addrs[i], p, t, e);
      checks++; if (p != pd[i] || t != td[i] || e) begin failures++; $display("seq %h %h %b", p, t, e); end
    end
    // single-bit upsets: every bit position of the 12-bit word
    for (int b = 0; b < 12; b++) begin
      int i;
      i = b % 16;
      cnt0 = seu_count;
      if (b % 2 == 0) dut.prog_mem[addrs[i]][b] = ~dut.prog_mem[addrs[i]][b];
      else            dut.pat_mem[addrs[i]][b]  = ~dut.pat_mem[addrs[i]][b];
      seq_read(addrs[i], p, t, e);
      checks++; if (p != pd[i] || t != td[i] || !e) begin failures++; $display("corr bit %0d: %h %h %b", b, p, t, e); end
      repeat (2) @(posedge clk);
      checks++; if (seu_count != cnt0 + 1) begin failures++; $display("seu %0d exp %0d", seu_count, cnt0 + 1); end
      checks++;
      if (dut.prog_mem[addrs[i]] != ham_encode(pd[i]) || dut.pat_mem[addrs[i]] != ham_encode(td[i])) begin
        failures++; $display("not written back bit %0d", b);
      end
    end
    // host read also corrects
    dut.pat_mem[addrs[3]][5] = ~dut.pat_mem[addrs[3]][5];
    host_read(1, addrs[3], d);
    checks++; if (d != td[3]) begin failures++; $display("host corr %h", d); end
    // priority: sequencer wins over host in the same cycle
    @(negedge clk);
    host_req = 1; host_we = 0; host_addr = addrs[0]; seq_rd = 1; seq_addr = addrs[1];
    #1;
    checks++; if (host_gnt) begin failures++; $display("host granted against seq"); end
    @(negedge clk); seq_rd = 0; host_req = 0;
    checks++; if (seq_prog != pd[1]) begin failures++; $display("seq lost"); end
    repeat (3) @(posedge clk);
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
