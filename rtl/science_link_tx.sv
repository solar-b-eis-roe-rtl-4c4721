// science_link_tx: transmitter of the 32 Mbit/s data-strobe science link.
//
// Every pixel period the four analogue chains deliver one 14-bit word each
// (pix_valid with pix_data[0..3] = CCD A left, CCD A right, CCD B left,
// CCD B right). Each word goes out as a 16-bit science character: CCD ID bit
// ('0' A, '1' B), node ID bit ('0' left, '1' right), then the data MSB first;
// the four characters of a pixel always go in the order 00, 01, 10, 11. One
// bit leaves per clock (32 Mbit/s at 32 MHz), back to back, so a group of four
// characters takes 64 cycles, exactly the 2 us pixel period. A group that
// arrives while one is still waiting is dropped and flagged on overflow.
//
// Data-strobe coding: sd carries the bit; ss toggles whenever a bit equals the
// previous one, so sd XOR ss toggles once per bit (the receiver's 16 MHz
// clock). When idle both hold their last state.
// eof (the CSG's end-of-sequence signal) queues the single 8-bit end-of-frame
// character 0xCC after the last science character; after it no new pixels are
// accepted until a Period of Silence (POS_CYC, 10 ms) has passed. After any
// POS_CYC cycles without a bit the transmitter sets sd and ss to '0' and
// clears its counters, the recovery the link protocol prescribes.
// Character formats, order, coding, rate and the recovery rule follow the
// board description; the one-group input buffer is this design's choice.
module science_link_tx #(
  parameter int unsigned POS_CYC = 320_000    // 10 ms at 32 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_valid,
  input  logic [13:0] pix_data [4],
  input  logic        eof,
  output logic        sd,
  output logic        ss,
  output logic        overflow,
  output logic        holding               // in the Period of Silence after 0xCC
);
  logic [13:0] buf_w [4];
  logic [13:0] cur   [4];
  logic        buf_full, ingrp, eof_pend;
  logic [15:0] sh;
  logic [4:0]  left;
  logic [1:0]  widx;
  logic [$clog2(POS_CYC + 1)-1:0] scnt;
  logic        accept;

  assign accept = pix_valid && !holding && (!buf_full || (left <= 5'd1 && !(ingrp && widx != 2'd3)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sd <= 1'b0; ss <= 1'b0; overflow <= 1'b0; holding <= 1'b0;
      buf_full <= 1'b0; ingrp <= 1'b0; eof_pend <= 1'b0;
      sh <= '0; left <= '0; widx <= '0; scnt <= '0;
      for (int i = 0; i < 4; i++) begin buf_w[i] <= '0; cur[i] <= '0; end
    end else begin
      overflow <= pix_valid && !accept;
      if (eof) eof_pend <= 1'b1;

      // line coding of the bit leaving this cycle
      if (left != 0) begin
        sd   <= sh[15];
        ss   <= (sh[15] == sd) ? !ss : ss;
        scnt <= '0;
      end else if (scnt != $bits(scnt)'(POS_CYC)) begin
        scnt <= scnt + 1'b1;
        if (scnt == $bits(scnt)'(POS_CYC - 1)) begin   // Period of Silence: reset the link
          sd <= 1'b0; ss <= 1'b0; widx <= '0; ingrp <= 1'b0; holding <= 1'b0;
        end
      end

      // character sequencing, loading the next one with the last bit of this one
      if (left > 5'd1) begin
        sh   <= {sh[14:0], 1'b0};
        left <= left - 1'b1;
      end else if (ingrp && widx != 2'd3) begin
        sh   <= {widx + 2'd1, cur[widx + 2'd1]};
        widx <= widx + 1'b1;
        left <= 5'd16;
      end else if (buf_full) begin
        cur      <= buf_w;
        buf_full <= 1'b0;
        ingrp    <= 1'b1;
        widx     <= 2'd0;
        sh       <= {2'b00, buf_w[0]};
        left     <= 5'd16;
      end else if (eof_pend && !eof) begin
        sh       <= {8'hCC, 8'h00};
        left     <= 5'd8;
        eof_pend <= 1'b0;
        ingrp    <= 1'b0;
        holding  <= 1'b1;
      end else begin
        left  <= '0;
        ingrp <= 1'b0;
      end

      if (accept) begin
        buf_w    <= pix_data;
        buf_full <= 1'b1;
      end
    end
  end
endmodule
