// csg_output_demux: the EIS output de-multiplexers of the CSG.
//
// Both CCDs are clocked from one pair of 11-bit pattern registers, so a single
// pattern bit has to be steered onto several physical clock lines. The five
// 11-bit control registers, seen as one 55-bit register, hold a two-bit
// selector for every clock output: "00" drives '0', "01" the first source,
// "10" the second source and "11" drives '1'. For the serial (R phi 1 and
// R phi 2) clocks of each side of each CCD the two sources are R1 and R2 of the
// row group, which lets a side run its serial register in either direction.
// For R phi 3, reset, summing well, the image clocks and the dump gate both
// sources are the same row or line group bit. Bit positions and reset values
// of the selectors follow the board description. Purely combinational.
module csg_output_demux
  import roe_pkg::*;
(
  input  logic [10:0] row_pat,
  input  logic [10:0] line_pat,
  input  logic [54:0] ctrl,
  output ccd_clk_t    clk_out
);
  function automatic logic sel(input logic [1:0] s, input logic a, input logic b);
    case (s)
      2'b00:   return 1'b0;
      2'b01:   return a;
      2'b10:   return b;
      default: return 1'b1;
    endcase
  endfunction

  logic r1, r2, r3, rr, sw, i1, i2, i3, dg;
  assign r1 = row_pat[ROW_R1];
  assign r2 = row_pat[ROW_R2];
  assign r3 = row_pat[ROW_R3];
  assign rr = row_pat[ROW_RR];
  assign sw = row_pat[ROW_SW];
  assign i1 = line_pat[LN_I1];
  assign i2 = line_pat[LN_I2];
  assign i3 = line_pat[LN_I3];
  assign dg = line_pat[LN_DG];

  always_comb begin
    // R phi 1: bits 1:0 right A, 3:2 left A, 5:4 right B, 7:6 left B
    clk_out.r1r_n[0] = sel(ctrl[1:0],   r1, r2);
    clk_out.r1l_n[0] = sel(ctrl[3:2],   r1, r2);
    clk_out.r1r_n[1] = sel(ctrl[5:4],   r1, r2);
    clk_out.r1l_n[1] = sel(ctrl[7:6],   r1, r2);
    // R phi 2: bits 9:8 right A, 11:10 left A, 13:12 right B, 15:14 left B
    clk_out.r2r_n[0] = sel(ctrl[9:8],   r1, r2);
    clk_out.r2l_n[0] = sel(ctrl[11:10], r1, r2);
    clk_out.r2r_n[1] = sel(ctrl[13:12], r1, r2);
    clk_out.r2l_n[1] = sel(ctrl[15:14], r1, r2);
    clk_out.r3_n[0]  = sel(ctrl[17:16], r3, r3);
    clk_out.r3_n[1]  = sel(ctrl[19:18], r3, r3);
    clk_out.rr_n[0]  = sel(ctrl[21:20], rr, rr);
    clk_out.rr_n[1]  = sel(ctrl[23:22], rr, rr);
    clk_out.swl_n[0] = sel(ctrl[25:24], sw, sw);
    clk_out.swr_n[0] = clk_out.swl_n[0];
    clk_out.swl_n[1] = sel(ctrl[27:26], sw, sw);
    clk_out.swr_n[1] = clk_out.swl_n[1];
    // bits 32..28 spare
    clk_out.i1_n[0]  = sel(ctrl[34:33], i1, i1);
    clk_out.i1_n[1]  = sel(ctrl[36:35], i1, i1);
    clk_out.i2_n[0]  = sel(ctrl[38:37], i2, i2);
    clk_out.i2_n[1]  = sel(ctrl[40:39], i2, i2);
    clk_out.i3_n[0]  = sel(ctrl[42:41], i3, i3);
    clk_out.i3_n[1]  = sel(ctrl[44:43], i3, i3);
    clk_out.dg_n[0]  = sel(ctrl[46:45], dg, dg);
    clk_out.dg_n[1]  = sel(ctrl[48:47], dg, dg);
  end
endmodule
