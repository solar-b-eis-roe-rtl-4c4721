// status_link: sender of the two-byte status messages to the ICU.
//
// Every status message is atomic and two bytes long: a message ID (0x03
// ACK/error, 0x0C end of sequence, 0x30 CSG dump, 0xC0 HK/AE dump) and one
// data byte. Two producers offer messages with a valid/ready handshake: the
// command interpreter (port a) and the CSG end-of-sequence detector (port b,
// which wins when both offer in the same cycle). Accepted messages wait in a
// small FIFO (DEPTH entries) and are sent ID first, data second, back to back,
// by a uart_tx at the status-link rate. Message codes and the two-byte atomic
// format follow the board description; the FIFO and its depth and the
// priority order are this design's choices.
module status_link
  import roe_pkg::*;
#(
  parameter int unsigned CLK_HZ = 32_000_000,
  parameter int unsigned BAUD   = 9600,
  parameter int unsigned DEPTH  = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  status_msg_t a_msg,
  input  logic        a_valid,
  output logic        a_ready,
  input  status_msg_t b_msg,
  input  logic        b_valid,
  output logic        b_ready,
  output logic        tx
);
  localparam int AW = $clog2(DEPTH);

  status_msg_t     q [DEPTH];
  logic [AW:0]     cnt;
  logic [AW-1:0]   rd, wr;
  logic            full, push, pop;
  status_msg_t     in_msg;
  logic [7:0]      tx_data;
  logic            tx_valid, tx_ready, second;

  assign full    = (cnt == (AW+1)'(DEPTH));
  assign b_ready = !full;
  assign a_ready = !full && !b_valid;
  assign push    = (b_valid && b_ready) || (a_valid && a_ready);
  assign in_msg  = b_valid ? b_msg : a_msg;

  assign tx_valid = (cnt != 0);
  assign tx_data  = second ? q[rd].data : q[rd].id;
  assign pop      = tx_valid && tx_ready && second;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; rd <= '0; wr <= '0; second <= 1'b0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      if (push) begin
        q[wr] <= in_msg;
        wr    <= (wr == AW'(DEPTH - 1)) ? '0 : wr + 1'b1;
      end
      if (tx_valid && tx_ready) second <= !second;
      if (pop) rd <= (rd == AW'(DEPTH - 1)) ? '0 : rd + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst_n, .tx_data, .tx_valid, .tx_ready, .tx
  );
endmodule
