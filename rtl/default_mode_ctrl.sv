// default_mode_ctrl: the ROE controller's default-mode sequence.
//
// After reset it replays the default-mode PROM into the command interpreter
// (the PROM holds a two-byte byte count, most significant first, then the
// commands), one byte per handshake with in_prom set. Then, for as long as
// the interpreter stays in default mode, it runs the default read-out cycle:
// START of the flush block, wait for the CSG to halt, wait INTEG_CYC cycles
// (8 s integration), START of the readout block, wait for the halt, wait
// GAP_CYC cycles (12 ms, time for the ICU to switch buffers), START of the
// readout block again, wait for the halt, and repeat from the flush. When the
// ICU's Exit default command clears default_mode no further START is issued;
// a sequence already running completes. The cycle (flush, 8 s, two readouts
// separated by a gap, repeat) follows the board description; the block
// numbers, measuring the gap from the end of the first readout and waiting for
// the CSG halt are this design's choices. The PROM byte goes straight to
// out_data, and csg_block only takes the two block numbers, so most of its
// bits are constant at the default parameters.
module default_mode_ctrl #(
  parameter int unsigned PROM_DEPTH    = 2048,
  parameter int unsigned INTEG_CYC     = 256_000_000,   // 8 s at 32 MHz
  parameter int unsigned GAP_CYC       = 384_000,       // 12 ms
  parameter logic [5:0]  FLUSH_BLOCK   = 6'd0,
  parameter logic [5:0]  READOUT_BLOCK = 6'd1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          default_mode,
  // PROM
  output logic [$clog2(PROM_DEPTH)-1:0] prom_addr,
  input  logic [7:0]                    prom_data,
  // command byte stream to the interpreter
  output logic [7:0]                    out_data,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic                          replaying,
  // CSG
  output logic                          csg_start,
  output logic [5:0]                    csg_block,
  input  logic                          csg_busy,
  output logic [1:0]                    phase        // 0 flush, 1 first readout, 2 second readout
);
  localparam int AW = $clog2(PROM_DEPTH);

  typedef enum logic [3:0] {
    D_LEN0, D_LEN1, D_LEN2, D_RD, D_FEED, D_START, D_WAIT1, D_WAIT, D_DELAY, D_OFF
  } st_e;

  st_e          st;
  logic [15:0]  len;
  logic [15:0]  sent;
  logic [$clog2(INTEG_CYC + 1)-1:0] dcnt;

  assign replaying = (st inside {D_LEN0, D_LEN1, D_LEN2, D_RD, D_FEED});
  assign out_valid = (st == D_FEED);
  assign out_data  = prom_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_LEN0; prom_addr <= '0; len <= '0; sent <= '0; dcnt <= '0;
      csg_start <= 1'b0; csg_block <= '0; phase <= '0;
    end else begin
      csg_start <= 1'b0;
      case (st)
        D_LEN0: begin prom_addr <= AW'(1); st <= D_LEN1; end           // data of addr 0 next
        D_LEN1: begin len[15:8] <= prom_data; prom_addr <= AW'(2); st <= D_LEN2; end
        D_LEN2: begin len[7:0] <= prom_data; st <= D_RD; end
        D_RD:   st <= (sent == len) ? D_START : D_FEED;
        D_FEED: if (out_ready) begin
          sent      <= sent + 1'b1;
          prom_addr <= prom_addr + 1'b1;
          st        <= D_RD;
        end
        D_START: begin
          if (!default_mode) st <= D_OFF;
          else begin
            csg_start <= 1'b1;
            csg_block <= (phase == 2'd0) ? FLUSH_BLOCK : READOUT_BLOCK;
            st        <= D_WAIT1;
          end
        end
        D_WAIT1: st <= D_WAIT;
        D_WAIT: if (!csg_busy) begin
          dcnt <= '0;
          st   <= (phase == 2'd2) ? D_START : D_DELAY;
          phase <= (phase == 2'd2) ? 2'd0 : phase + 1'b1;
        end
        D_DELAY: begin
          // phase already advanced: 1 = after flush (integrate), 2 = between readouts
          if (!default_mode) st <= D_OFF;
          else if (dcnt == $bits(dcnt)'((phase == 2'd1 ? INTEG_CYC : GAP_CYC) - 1)) st <= D_START;
          else dcnt <= dcnt + 1'b1;
        end
        D_OFF: ;
        default: st <= D_OFF;
      endcase
    end
  end
endmodule
