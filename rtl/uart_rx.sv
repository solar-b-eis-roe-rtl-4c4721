// uart_rx: asynchronous serial receiver for the ICU command link.
//
// The link carries one start bit ('0'), eight data bits LSB first and one
// stop bit ('1') at a fixed 9600 baud, idling at '1'. The receiver
// synchronises the line with two flip-flops, waits for a falling edge, checks
// the start bit again half a bit later and then samples every following bit in
// its middle. A completed byte is held in rx_data with rx_valid high until
// rx_ready takes it; a byte arriving while the previous one is still held is
// dropped and flagged on overrun (one cycle). A missing stop bit raises
// frame_err for one cycle and the byte is discarded.
// Frame format and rate follow the board description; LSB-first order,
// mid-bit sampling and the one-byte holding register are this design's choices.
// Timing: rx_valid rises about 9.5 bit times after the start edge.
module uart_rx #(
  parameter int unsigned CLK_HZ = 32_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  input  logic       rx_ready,
  output logic       frame_err,
  output logic       overrun
);
  localparam int unsigned DIV  = CLK_HZ / BAUD;
  localparam int unsigned CW   = $clog2(DIV + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} st_e;
  st_e           st;
  logic [2:0]    sync;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= 3'b111; st <= IDLE; cnt <= '0; bitn <= '0; sh <= '0;
      rx_data <= '0; rx_valid <= 1'b0; frame_err <= 1'b0; overrun <= 1'b0;
    end else begin
      sync      <= {sync[1:0], rx};
      frame_err <= 1'b0;
      overrun   <= 1'b0;
      if (rx_valid && rx_ready) rx_valid <= 1'b0;
      case (st)
        IDLE: if (sync[2:1] == 2'b10) begin st <= START; cnt <= CW'(DIV / 2); end
        START: if (cnt == 0) begin
                 if (sync[2]) st <= IDLE;        // glitch, not a start bit
                 else begin st <= DATA; cnt <= CW'(DIV - 1); bitn <= '0; end
               end else cnt <= cnt - 1'b1;
        DATA: if (cnt == 0) begin
                sh  <= {sync[2], sh[7:1]};
                cnt <= CW'(DIV - 1);
                bitn <= bitn + 1'b1;
                if (bitn == 3'd7) st <= STOP;
              end else cnt <= cnt - 1'b1;
        STOP: if (cnt == 0) begin
                st <= IDLE;
                if (!sync[2]) frame_err <= 1'b1;
                else if (rx_valid && !rx_ready) overrun <= 1'b1;
                else begin rx_data <= sh; rx_valid <= 1'b1; end
              end else cnt <= cnt - 1'b1;
      endcase
    end
  end
endmodule
