// charge_pump_sel: drive selection for the -10 V charge pump.
//
// When the line-group bit chrg_pmp is '1' the charge pump is timed by the CSG
// and follows the row-group bit chrg_sync; when it is '0' the pump runs from a
// free-running square wave of OSC_HZ (500 kHz) made by dividing the system
// clock. Behaviour and frequency follow the board description; making the
// 500 kHz oscillator a clock divider on this board is this design's choice.
// Timing: the output is registered, one clock after its source.
module charge_pump_sel #(
  parameter int unsigned CLK_HZ = 32_000_000,
  parameter int unsigned OSC_HZ = 500_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic chrg_pmp,
  input  logic chrg_sync,
  output logic pump
);
  localparam int unsigned HALF = CLK_HZ / OSC_HZ / 2;
  localparam int unsigned CW   = $clog2(HALF + 1);

  logic [CW-1:0] cnt;
  logic          osc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; osc <= 1'b0; pump <= 1'b0;
    end else begin
      if (cnt == CW'(HALF - 1)) begin cnt <= '0; osc <= !osc; end
      else cnt <= cnt + 1'b1;
      pump <= chrg_pmp ? chrg_sync : osc;
    end
  end
endmodule
