// csg_ram: the CSG program and pattern RAMs with their error-correcting interface.
//
// Two banks of 128K bytes each (bank 0 = program RAM, bank 1 = pattern RAM),
// split into 64 blocks of 2K. Every byte is stored with four Hamming check
// bits (12-bit words). A read returns the corrected byte of both banks one
// cycle after the request; if either word held a single-bit error the word is
// corrected on the way out, the corrected word is written back into the RAM in
// the following cycle and the SEU counter (8 bits, saturating) is incremented.
// A double-bit error is not recognised as such and is "corrected" into another
// wrong value, as in the original design.
//
// Port priority, one access per cycle: write-back, then the sequencer fetch
// (seq_rd), then the ICU host port. host_gnt tells the host in the same cycle
// that its request was taken; host read data appear on host_rdata with
// host_rvalid one cycle after the grant. seq_err flags a corrected fetch so
// that the sequencer can pause while the write-back takes place.
// The bank sizes, block size, four check bits, correction, counter and
// write-back follow the board description; the code layout (see roe_pkg), the
// single-port arbitration and the counter width are this design's choices.
module csg_ram
  import roe_pkg::*;
#(
  parameter int unsigned ADDR_W = 17   // 128K bytes per bank
) (
  input  logic              clk,
  input  logic              rst_n,
  // sequencer fetch port: reads both banks
  input  logic              seq_rd,
  input  logic [ADDR_W-1:0] seq_addr,
  output logic [7:0]        seq_prog,
  output logic [7:0]        seq_pat,
  output logic              seq_valid,
  output logic              seq_err,
  // ICU host port
  input  logic              host_req,
  input  logic              host_we,
  input  logic              host_bank,   // 0 program RAM, 1 pattern RAM
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [7:0]        host_wdata,
  output logic              host_gnt,
  output logic [7:0]        host_rdata,
  output logic              host_rvalid,
  output logic [7:0]        seu_count
);
  localparam int unsigned WORDS = 1 << ADDR_W;

  logic [ECC_W-1:0] prog_mem [WORDS];
  logic [ECC_W-1:0] pat_mem  [WORDS];

  logic [ECC_W-1:0]  raw_prog, raw_pat, fix_prog, fix_pat;
  logic              rd_seq, rd_host, rd_bank;
  logic [ADDR_W-1:0] rd_addr;
  logic              err_prog, err_pat, any_err;
  logic              do_read, do_wb;

  // correction of the word read in the previous cycle
  assign fix_prog = ham_correct(raw_prog);
  assign fix_pat  = ham_correct(raw_pat);
  assign err_prog = (rd_seq || rd_host) && (ham_syndrome(raw_prog) != 4'd0);
  assign err_pat  = (rd_seq || rd_host) && (ham_syndrome(raw_pat)  != 4'd0);
  assign any_err  = err_prog || err_pat;
  assign do_wb    = any_err;

  assign host_gnt = host_req && !seq_rd && !do_wb;
  assign do_read  = !do_wb && (seq_rd || (host_req && !host_we));

  assign seq_prog    = ham_data(fix_prog);
  assign seq_pat     = ham_data(fix_pat);
  assign seq_valid   = rd_seq;
  assign seq_err     = rd_seq && any_err;
  assign host_rdata  = rd_bank ? ham_data(fix_pat) : ham_data(fix_prog);
  assign host_rvalid = rd_host;

  // memory array: one write or one read per cycle
  always_ff @(posedge clk) begin
    if (do_wb) begin
      if (err_prog) prog_mem[rd_addr] <= fix_prog;
      if (err_pat)  pat_mem[rd_addr]  <= fix_pat;
    end else if (host_gnt && host_we) begin
      if (host_bank) pat_mem[host_addr]  <= ham_encode(host_wdata);
      else           prog_mem[host_addr] <= ham_encode(host_wdata);
    end
    if (do_read) begin
      raw_prog <= prog_mem[seq_rd ? seq_addr : host_addr];
      raw_pat  <= pat_mem[seq_rd ? seq_addr : host_addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_seq <= 1'b0; rd_host <= 1'b0; rd_bank <= 1'b0; rd_addr <= '0;
      seu_count <= '0;
    end else begin
      rd_seq  <= do_read && seq_rd;
      rd_host <= do_read && !seq_rd;
      if (do_read) begin
        rd_addr <= seq_rd ? seq_addr : host_addr;
        rd_bank <= host_bank;
      end
      if (any_err && seu_count != 8'hFF) seu_count <= seu_count + 1'b1;
    end
  end
endmodule
