// ae_bus_if: register access to the analogue PCB over the ROE back-plane.
//
// The analogue PCB's control registers (bias DACs for VOD, VRD and VSS of both
// CCDs, two control registers, spare registers, and the read-only SEU counter)
// are reached through a 6-bit address bus A, a bidirectional 8-bit data bus D
// and the strobes WR_EN and RD_EN. A request (req with we, addr, wdata) runs
// one bus cycle: address (and data for a write) are driven for SETUP cycles,
// then the strobe is high for PULSE cycles, then the bus is released for one
// cycle. A read samples D at the end of the strobe. done pulses for one cycle
// with rdata valid. The signals and their purpose follow the board
// description; the bus timing, the active-high strobes and the mapping of
// parameter n of the Setup AE command to address n are this design's choices.
// D is split into d_out, d_oe and d_in; the board drives D only while d_oe is high.
module ae_bus_if #(
  parameter int unsigned SETUP = 2,
  parameter int unsigned PULSE = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req,
  input  logic       we,
  input  logic [5:0] addr,
  input  logic [7:0] wdata,
  output logic       busy,
  output logic       done,
  output logic [7:0] rdata,
  // back-plane
  output logic [5:0] bp_a,
  output logic [7:0] bp_d_out,
  output logic       bp_d_oe,
  input  logic [7:0] bp_d_in,
  output logic       bp_wr_en,
  output logic       bp_rd_en
);
  typedef enum logic [1:0] {IDLE, ADDR, STROBE, REL} st_e;
  st_e        st;
  logic [3:0] cnt;
  logic       is_wr;

  assign busy = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; cnt <= '0; is_wr <= 1'b0; done <= 1'b0; rdata <= '0;
      bp_a <= '0; bp_d_out <= '0; bp_d_oe <= 1'b0; bp_wr_en <= 1'b0; bp_rd_en <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        IDLE: if (req) begin
          bp_a     <= addr;
          bp_d_out <= wdata;
          bp_d_oe  <= we;
          is_wr    <= we;
          cnt      <= 4'(SETUP - 1);
          st       <= ADDR;
        end
        ADDR: if (cnt == 0) begin
          bp_wr_en <= is_wr;
          bp_rd_en <= !is_wr;
          cnt      <= 4'(PULSE - 1);
          st       <= STROBE;
        end else cnt <= cnt - 1'b1;
        STROBE: if (cnt == 0) begin
          bp_wr_en <= 1'b0;
          bp_rd_en <= 1'b0;
          if (!is_wr) rdata <= bp_d_in;
          st <= REL;
        end else cnt <= cnt - 1'b1;
        REL: begin
          bp_d_oe <= 1'b0;
          done    <= 1'b1;
          st      <= IDLE;
        end
      endcase
    end
  end
endmodule
