// reset_gen: system reset of the ROE digital board.
//
// Combines the power-on reset (por_n, asynchronous, active low) with the
// hard-reset request of the ICU Reset command (hard_rst, one-cycle pulse).
// Power-on reset asserts rst_n at once (asynchronously); a hard-reset pulse
// is registered and asserts rst_n one cycle later. rst_n is released
// synchronously HOLD cycles after both are gone. rst_n also drives the back-plane SYS_RESET_N, so
// the analogue board is reset together with this board. That both sources
// return the board to default mode follows the board description; the
// synchroniser and the hold length are this design's choices.
module reset_gen #(
  parameter int unsigned HOLD = 16
) (
  input  logic clk,
  input  logic por_n,
  input  logic hard_rst,
  output logic rst_n
);
  localparam int unsigned CW = $clog2(HOLD + 1);

  logic [CW-1:0] cnt;
  logic          hr;

  // hard reset: registered request, cleared only by power-on reset
  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) hr <= 1'b0;
    else        hr <= hard_rst;
  end

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      cnt <= '0; rst_n <= 1'b0;
    end else if (hr) begin
      cnt <= '0; rst_n <= 1'b0;
    end else if (cnt != CW'(HOLD)) begin
      cnt <= cnt + 1'b1; rst_n <= 1'b0;
    end else begin
      rst_n <= 1'b1;
    end
  end
endmodule
