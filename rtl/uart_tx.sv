// uart_tx: asynchronous serial transmitter for the ICU status link.
//
// Sends one start bit ('0'), eight data bits LSB first and one stop bit ('1')
// per byte at a fixed 9600 baud; the line idles at '1'. A byte is taken when
// tx_valid and tx_ready are both high; tx_ready is low for the ten bit times
// of the character. Frame format and rate follow the board description; LSB
// first is this design's choice. Timing: the start bit begins the cycle after
// the byte is accepted; back-to-back bytes start exactly 10 bit times apart.
module uart_tx #(
  parameter int unsigned CLK_HZ = 32_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  output logic       tx_ready,
  output logic       tx
);
  localparam int unsigned DIV = CLK_HZ / BAUD;
  localparam int unsigned CW  = $clog2(DIV + 1);

  logic [9:0]    sh;
  logic [3:0]    idx;
  logic          busy;
  logic [CW-1:0] cnt;

  // a new byte may be taken in the last cycle of the previous stop bit
  assign tx_ready = !busy || (idx == 4'd9 && cnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '1; idx <= '0; busy <= 1'b0; cnt <= '0; tx <= 1'b1;
    end else if (tx_ready) begin
      tx   <= 1'b1;
      busy <= 1'b0;
      if (tx_valid) begin
        sh   <= {1'b1, tx_data, 1'b0};
        tx   <= 1'b0;               // start bit
        busy <= 1'b1;
        idx  <= '0;
        cnt  <= CW'(DIV - 1);
      end
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
    end else begin
      idx <= idx + 1'b1;
      sh  <= {1'b1, sh[9:1]};
      tx  <= sh[1];
      cnt <= CW'(DIV - 1);
    end
  end
endmodule
