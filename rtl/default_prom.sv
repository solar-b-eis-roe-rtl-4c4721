// default_prom: the default-mode command PROM.
//
// A read-only memory of DEPTH bytes, read synchronously (data one cycle after
// the address). Its contents are a byte count (two bytes, most significant
// first) followed by that many bytes of ordinary ICU commands: one Setup AE
// command and the Set up CSG commands that load the flush and readout
// programs and the stimulus pattern program of block 6. The default image is
// read from FILE. That the default mode is a
// series of commands held in a PROM follows the board description; the length
// header, the size and the contents of the image are this design's choices.
module default_prom #(
  parameter int unsigned DEPTH = 2048,
  parameter string       FILE  = "rtl/default_prom.hex"
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [7:0]               data
);
  logic [7:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = 8'h00;
    $readmemh(FILE, rom);
  end

  always_ff @(posedge clk) data <= rom[addr];
endmodule
