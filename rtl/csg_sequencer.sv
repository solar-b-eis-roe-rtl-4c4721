// csg_sequencer: micro-program sequencer of the clock sequence generator (CSG).
//
// Each 16-bit instruction is one program-RAM byte (high half) and one
// pattern-RAM byte (low half) fetched from the same address. Bits 15..11 are
// the opcode, bits 10..0 the data or output pattern (LOADn uses bits 11..0 as
// a 12-bit loop count). An instruction takes four clock cycles (125 ns at
// 32 MHz): fetch, latch into the program register, decode, execute.
// Instructions that update the outputs (HALT, DJNZn, JBOSn, NOP) additionally
// dwell for n x 4 cycles, n being bits 9..0 of the dwell register, so they take
// (n+1) x 125 ns, and the new pattern appears at the end of that time.
// Bit 10 of the dwell register picks the pattern register the outputs go to:
// 0 = row (pixel) group, 1 = line group.
//
// START (start + start_block) loads the block number and clears the PC; the
// program runs until HALT, then the sequencer idles. LOADn loads loop counter
// n and its return register (PC of the next instruction); DJNZn decrements the
// counter and jumps back while it is not zero (a count of 1 runs a loop once).
// LDSIGnJ stores the next PC in jump register n; JBOSn jumps there unless
// signal n has been received since, in which case the flag is cleared and the
// program carries on. CTRLREGn loads 11 bits of the 55-bit output
// de-multiplexer control register. A fetch that needed error correction
// (ram_err) pauses the sequence for one extra 125 ns slot while the RAM writes
// the corrected word back. A rising edge of the line-group end-of-flush or
// end-of-readout bit gives a one-cycle eoseq pulse (the block number is on
// block). All of this follows the board description; the reset values of the
// pattern registers (every active-low clock inactive), the behaviour of spare
// opcodes (no operation, no output) and a START during a running sequence
// (restarts at the new block) are this design's choices.
module csg_sequencer
  import roe_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [5:0]  start_block,
  input  logic [1:0]  sig,            // one-cycle SIG0 / SIG1 pulses
  // RAM fetch port
  output logic        ram_rd,
  output logic [16:0] ram_addr,
  input  logic [7:0]  ram_prog,
  input  logic [7:0]  ram_pat,
  input  logic        ram_err,
  // state and outputs
  output logic [10:0] row_pat,
  output logic [10:0] line_pat,
  output logic [54:0] ctrl,
  output logic        busy,
  output logic [5:0]  block,
  output logic        eoseq,
  output logic        upd              // one-cycle pulse when a pattern is output
);
  localparam logic [10:0] ROW_RESET  = 11'h0DF;
  localparam logic [10:0] LINE_RESET = 11'h00F;

  typedef enum logic [2:0] {S_HALT, S_FETCH, S_LATCH, S_PAUSE, S_DECODE, S_EXEC} st_e;
  st_e          st;
  logic [10:0]  pc;
  logic [15:0]  ir;
  logic [10:0]  dwell;
  logic [11:0]  lc [4];
  logic [10:0]  la [4];
  logic [10:0]  jr [2];
  logic [1:0]   sigf;
  logic [12:0]  wcnt;
  logic [1:0]   pcnt;

  csg_op_e      op;
  logic [10:0]  d11;
  logic [11:0]  d12;
  logic         is_out;
  logic [1:0]   ln;
  logic [11:0]  lc_dec;

  assign op     = csg_op_e'(ir[15:11]);
  assign d11    = ir[10:0];
  assign d12    = ir[11:0];
  assign is_out = (op == OP_HALT) || (ir[15:14] == 2'b11 && op != 5'b11110);
  assign ln     = ir[13:12];                 // loop number of LOADn (prog bits 5..4)
  assign lc_dec = lc[ir[12:11]] - 1'b1;      // DJNZn: n = prog bits 4..3

  assign ram_rd   = (st == S_FETCH);
  assign ram_addr = {block, pc};
  assign busy     = (st != S_HALT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_HALT; pc <= '0; ir <= '0; dwell <= '0; block <= '0;
      row_pat <= ROW_RESET; line_pat <= LINE_RESET; ctrl <= CTRL_RESET;
      for (int i = 0; i < 4; i++) begin lc[i] <= '0; la[i] <= '0; end
      jr[0] <= '0; jr[1] <= '0; sigf <= '0; wcnt <= '0; pcnt <= '0;
      eoseq <= 1'b0; upd <= 1'b0;
    end else begin
      eoseq <= 1'b0;
      upd   <= 1'b0;
      sigf  <= sigf | sig;
      if (start) begin
        block <= start_block;
        pc    <= '0;
        sigf  <= sig;
        st    <= S_FETCH;
      end else begin
        case (st)
          S_HALT:   ;
          S_FETCH:  st <= S_LATCH;
          S_LATCH: begin
            ir   <= {ram_prog, ram_pat};
            pcnt <= 2'd3;
            st   <= ram_err ? S_PAUSE : S_DECODE;
          end
          S_PAUSE: begin                      // corrected data is written back
            pcnt <= pcnt - 1'b1;
            if (pcnt == 0) st <= S_DECODE;
          end
          S_DECODE: begin
            wcnt <= is_out ? {1'b0, dwell[9:0], 2'b00} : '0;
            st   <= S_EXEC;
          end
          S_EXEC: begin
            if (wcnt != 0) wcnt <= wcnt - 1'b1;
            else begin
              pc <= pc + 1'b1;
              st <= S_FETCH;
              if (is_out) begin
                upd <= 1'b1;
                if (dwell[10]) begin
                  line_pat <= d11;
                  eoseq <= (d11[LN_FLUSH] && !line_pat[LN_FLUSH]) ||
                           (d11[LN_RDOUT] && !line_pat[LN_RDOUT]);
                end else row_pat <= d11;
              end
              unique case (op) inside
                OP_HALT:    st <= S_HALT;
                OP_CTRL0:   ctrl[10:0]  <= d11;
                OP_CTRL1:   ctrl[21:11] <= d11;
                OP_CTRL2:   ctrl[32:22] <= d11;
                OP_CTRL3:   ctrl[43:33] <= d11;
                OP_CTRL4:   ctrl[54:44] <= d11;
                OP_LDWL:    dwell <= d11;
                OP_LDSIG0J: jr[0] <= pc + 1'b1;
                OP_LDSIG1J: jr[1] <= pc + 1'b1;
                5'b10???: begin lc[ln] <= d12; la[ln] <= pc + 1'b1; end
                OP_DJNZ0, OP_DJNZ1, OP_DJNZ2, OP_DJNZ3: begin
                  lc[ir[12:11]] <= lc_dec;
                  if (lc_dec != 0) pc <= la[ir[12:11]];
                end
                OP_JBOS0, OP_JBOS1: begin
                  if (sigf[ir[11]] || sig[ir[11]]) sigf[ir[11]] <= 1'b0;
                  else pc <= jr[ir[11]];
                end
                default: ;
              endcase
            end
          end
          default: st <= S_HALT;
        endcase
      end
    end
  end
endmodule
