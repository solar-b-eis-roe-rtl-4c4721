// csg: the clock sequence generator, sequencer plus EIS output de-multiplexers.
//
// Wraps csg_sequencer and csg_output_demux and turns the sequencer's
// end-of-sequence pulse into a held status message (ID 0x0C, data = block
// number) offered with a valid/ready handshake to the status link. The row
// and line pattern registers are brought out as well, since their
// non-clock bits (ADC convert, clamp, isolate, stims, end of sequence, ADC
// power down, charge pump control) go straight to the back-plane. The RAM
// fetch port is passed through to csg_ram, which sits outside as on the
// board. The message format follows the board description; holding one
// pending message (a second one before it is taken is lost) is this
// design's choice. The message ID byte is always 0x0C, so those eight output
// bits are constant.
module csg
  import roe_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [5:0]  start_block,
  input  logic [1:0]  sig,
  output logic        ram_rd,
  output logic [16:0] ram_addr,
  input  logic [7:0]  ram_prog,
  input  logic [7:0]  ram_pat,
  input  logic        ram_err,
  output logic [10:0] row_pat,
  output logic [10:0] line_pat,
  output ccd_clk_t    ccd,
  output logic        busy,
  output status_msg_t eos_msg,
  output logic        eos_valid,
  input  logic        eos_ready
);
  logic [54:0] ctrl;
  logic [5:0]  block;
  logic        eoseq, upd;

  csg_sequencer u_seq (
    .clk, .rst_n, .start, .start_block, .sig,
    .ram_rd, .ram_addr, .ram_prog, .ram_pat, .ram_err,
    .row_pat, .line_pat, .ctrl, .busy, .block, .eoseq, .upd
  );

  csg_output_demux u_demux (.row_pat, .line_pat, .ctrl, .clk_out(ccd));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eos_valid <= 1'b0; eos_msg <= '0;
    end else begin
      if (eos_valid && eos_ready) eos_valid <= 1'b0;
      if (eoseq) begin
        eos_valid <= 1'b1;
        eos_msg   <= '{id: ST_EOSEQ, data: {2'b00, block}};
      end
    end
  end
endmodule
