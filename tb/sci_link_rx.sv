// sci_link_rx: testbench-only model of the ICU end of the science link.
//
// Recovers the bit clock as data XOR strobe: every change of it delivers the
// current data bit. Sixteen bits make a science character (pushed as valid
// with the 16-bit value). After POS clocks without a bit: a pending 8-bit
// character is an end-of-frame character (eof pulse with its value), any other
// incomplete character is a link error (err pulse); the bit counter is then
// cleared.
module sci_link_rx #(
  parameter int POS = 317
) (
  input  logic        clk,
  input  logic        sd,
  input  logic        ss,
  output logic [15:0] char_data,
  output logic        char_valid,
  output logic [7:0]  eof_data,
  output logic        eof,
  output logic        err
);
  logic        x_d;
  logic [15:0] sh;
  int          nb, quiet;
  initial begin
    x_d = 0; sh = 0; nb = 0; quiet = 0; char_valid = 0; eof = 0; err = 0;
    char_data = 0; eof_data = 0;
    forever begin
      @(negedge clk);
      char_valid = 0; eof = 0; err = 0;
      if ((sd ^ ss) != x_d) begin
        x_d = sd ^ ss;
        sh = {sh[14:0], sd};
        nb++;
        quiet = 0;
        if (nb == 16) begin char_data = sh; char_valid = 1; nb = 0; end
      end else begin
        quiet++;
        if (quiet == POS) begin
          if (nb == 8) begin eof_data = sh[7:0]; eof = 1; end
          else if (nb != 0) err = 1;
          nb = 0;
        end
      end
    end
  end
endmodule
