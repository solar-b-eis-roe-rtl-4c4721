// tb_csg_output_demux: checks every selector of the CSG output de-multiplexer.
//
// For random row/line patterns and random control words, each CCD clock
// output is compared with a reference model written from the selector table:
// "00" -> 0, "01" -> first source, "10" -> second source, "11" -> 1, with
// R1/R2 as the two sources of the serial clocks. The reset control word must
// route R1 to every R phi 1 output and R2 to every R phi 2 output.
module tb_csg_output_demux;
  import roe_pkg::*;
  logic [10:0] row_pat, line_pat;
  logic [54:0] ctrl;
  ccd_clk_t    clk_out;
  int checks = 0, failures = 0;

  csg_output_demux dut (.*);

  function automatic logic ref_sel(input logic [1:0] s, input logic a, input logic b);
    return (s == 0) ? 1'b0 : (s == 1) ? a : (s == 2) ? b : 1'b1;
  endfunction

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s got %b exp %b ctrl=%h", what, got, exp, ctrl); end
  endtask

  initial begin
    for (int t = 0; t < 400; t++) begin
      row_pat  = 11'($urandom);
      line_pat = 11'($urandom);
      ctrl     = (t < 20) ? CTRL_RESET : {23'($urandom), $urandom};
      #1;
      for (int c = 0; c < 2; c++) begin
        chk(clk_out.r1r_n[c], ref_sel(ctrl[4*c+1 -: 2], row_pat[0], row_pat[1]), "r1r");
        chk(clk_out.r1l_n[c], ref_sel(ctrl[4*c+3 -: 2], row_pat[0], row_pat[1]), "r1l");
        chk(clk_out.r2r_n[c], ref_sel(ctrl[8+4*c+1 -: 2], row_pat[0], row_pat[1]), "r2r");
        chk(clk_out.r2l_n[c], ref_sel(ctrl[8+4*c+3 -: 2], row_pat[0], row_pat[1]), "r2l");
        chk(clk_out.r3_n[c],  ref_sel(ctrl[16+2*c+1 -: 2], row_pat[2], row_pat[2]), "r3");
        chk(clk_out.rr_n[c],  ref_sel(ctrl[20+2*c+1 -: 2], row_pat[3], row_pat[3]), "rr");
        chk(clk_out.swl_n[c], ref_sel(ctrl[24+2*c+1 -: 2], row_pat[4], row_pat[4]), "swl");
        chk(clk_out.swr_n[c], ref_sel(ctrl[24+2*c+1 -: 2], row_pat[4], row_pat[4]), "swr");
        chk(clk_out.i1_n[c],  ref_sel(ctrl[33+2*c+1 -: 2], line_pat[0], line_pat[0]), "i1");
        chk(clk_out.i2_n[c],  ref_sel(ctrl[37+2*c+1 -: 2], line_pat[1], line_pat[1]), "i2");
        chk(clk_out.i3_n[c],  ref_sel(ctrl[41+2*c+1 -: 2], line_pat[2], line_pat[2]), "i3");
        chk(clk_out.dg_n[c],  ref_sel(ctrl[45+2*c+1 -: 2], line_pat[3], line_pat[3]), "dg");
        if (t < 20) begin
          chk(clk_out.r1l_n[c], row_pat[0], "reset r1");
          chk(clk_out.r2r_n[c], row_pat[1], "reset r2");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
