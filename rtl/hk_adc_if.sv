// hk_adc_if: sequencing of the housekeeping ADC on the power supply PCB.
//
// An HK request (req with the 6-bit HK parameter ID) wakes the ADC from nap
// (HK_SHUT_DOWN_N high), sets the analogue multiplexer (HK_MUX_SEL = ID,
// MSB 0) and waits SETTLE cycles, pulses HK_CONV_START_N low for PULSE cycles,
// waits for HK_DATA_RDY, enables the ADC output (HK_OE_N low) for PULSE
// cycles and samples the byte from the data bus, then puts the ADC back into
// nap. If HK_DATA_RDY does not come within WAIT_MAX cycles the result is
// 0x00. done pulses for one cycle with data valid. The signals follow the
// board description; their timing, the active-high data-ready, napping the
// ADC between requests and the time-out are this design's choices.
// HK_MUX_SEL is seven bits wide on the back-plane, but the HK parameter IDs
// of the status list fit in six, so its top bit is a constant 0.
module hk_adc_if #(
  parameter int unsigned SETTLE   = 320,     // 10 us
  parameter int unsigned PULSE    = 4,
  parameter int unsigned WAIT_MAX = 32000    // 1 ms
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req,
  input  logic [5:0] id,
  output logic       busy,
  output logic       done,
  output logic [7:0] data,
  // back-plane
  output logic [6:0] hk_mux_sel,
  output logic       hk_conv_start_n,
  output logic       hk_shut_down_n,
  output logic       hk_oe_n,
  input  logic       hk_data_rdy,
  input  logic [7:0] bp_d_in
);
  typedef enum logic [2:0] {IDLE, SETTLING, CONV, WAITRDY, READ} st_e;
  st_e   st;
  logic [$clog2(WAIT_MAX + SETTLE + 1)-1:0] cnt;

  assign busy = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; cnt <= '0; done <= 1'b0; data <= '0;
      hk_mux_sel <= '0; hk_conv_start_n <= 1'b1; hk_shut_down_n <= 1'b0; hk_oe_n <= 1'b1;
    end else begin
      done <= 1'b0;
      case (st)
        IDLE: if (req) begin
          hk_mux_sel     <= {1'b0, id};
          hk_shut_down_n <= 1'b1;
          cnt            <= '0;
          st             <= SETTLING;
        end
        SETTLING: if (cnt == $bits(cnt)'(SETTLE - 1)) begin
          hk_conv_start_n <= 1'b0; cnt <= '0; st <= CONV;
        end else cnt <= cnt + 1'b1;
        CONV: if (cnt == $bits(cnt)'(PULSE - 1)) begin
          hk_conv_start_n <= 1'b1; cnt <= '0; st <= WAITRDY;
        end else cnt <= cnt + 1'b1;
        WAITRDY: if (hk_data_rdy) begin
          hk_oe_n <= 1'b0; cnt <= '0; st <= READ;
        end else if (cnt == $bits(cnt)'(WAIT_MAX - 1)) begin
          data <= 8'h00; hk_shut_down_n <= 1'b0; done <= 1'b1; st <= IDLE;
        end else cnt <= cnt + 1'b1;
        READ: if (cnt == $bits(cnt)'(PULSE - 1)) begin
          data <= bp_d_in; hk_oe_n <= 1'b1; hk_shut_down_n <= 1'b0;
          done <= 1'b1; st <= IDLE;
        end else cnt <= cnt + 1'b1;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
