// roe_pkg: shared constants, types and functions of the EIS ROE digital board.
//
// Holds the command and status message codes of the ICU links, the CSG
// (clock sequence generator) instruction opcodes, the 55-bit control register
// reset value, the CSG RAM geometry and the Hamming(12,8) code that protects
// every CSG RAM byte. The codes, the RAM geometry, the opcode table and the
// control-register reset value follow the board description; the bit layout
// of the Hamming code (check bits at codeword positions 1, 2, 4 and 8) is a
// choice of this design, as only "four check bits per byte, single error
// correction" is specified.
package roe_pkg;

  // ---------------- ICU command link (first byte of each command) ----------
  localparam logic [7:0] CMD_RESET       = 8'h40;
  localparam logic [7:0] CMD_EXIT_DEF    = 8'h41;
  localparam logic [7:0] CMD_START_CSG   = 8'h42;
  localparam logic [7:0] CMD_DUMP_CSG    = 8'h43;
  localparam logic [7:0] CMD_PROG_WIN    = 8'h44;
  localparam logic [7:0] CMD_SETUP_AE    = 8'h45;
  localparam logic [7:0] CMD_SETUP_CSG   = 8'h46;
  localparam logic [7:0] CMD_HK_REQ      = 8'h47;
  localparam logic [7:0] CMD_CSG_SIG     = 8'h48;
  localparam logic [7:0] CMD_DUMP_AE     = 8'h49;

  // Total length in bytes (header included) of each valid command, 0 if invalid.
  function automatic logic [6:0] cmd_length(input logic [7:0] id);
    case (id)
      CMD_RESET, CMD_EXIT_DEF:                          return 7'd1;
      CMD_START_CSG, CMD_HK_REQ, CMD_CSG_SIG, CMD_DUMP_AE: return 7'd2;
      CMD_DUMP_CSG:                                     return 7'd4;
      CMD_PROG_WIN:                                     return 7'd5;
      CMD_SETUP_AE:                                     return 7'd9;
      CMD_SETUP_CSG:                                    return 7'd67;
      default:                                          return 7'd0;
    endcase
  endfunction

  // ---------------- status link (two-byte messages) ------------------------
  localparam logic [7:0] ST_ACK_ERR  = 8'h03;
  localparam logic [7:0] ST_EOSEQ    = 8'h0C;
  localparam logic [7:0] ST_DUMP_CSG = 8'h30;
  localparam logic [7:0] ST_HK_AE    = 8'hC0;
  localparam logic [7:0] ACK_OK      = 8'h00;
  localparam logic [7:0] ERR_BAD_HDR = 8'h01;
  localparam logic [7:0] ERR_TIMEOUT = 8'hFF;

  typedef struct packed {
    logic [7:0] id;
    logic [7:0] data;
  } status_msg_t;

  // ---------------- CSG RAM geometry ----------------------------------------
  localparam int CSG_ADDR_W  = 17;   // 128K bytes per bank
  localparam int CSG_BLOCK_W = 6;    // 64 blocks of 2K
  localparam int CSG_PC_W    = 11;   // address inside a block
  localparam int ECC_W       = 12;   // 8 data + 4 check bits

  // ---------------- CSG instruction set -------------------------------------
  // Opcode = {program byte bits 7..4, program byte bit 3}.
  typedef enum logic [4:0] {
    OP_HALT    = 5'b00000, OP_CTRL0   = 5'b00001, OP_CTRL1 = 5'b00010,
    OP_CTRL2   = 5'b00011, OP_CTRL3   = 5'b00100, OP_CTRL4 = 5'b00101,
    OP_LDWL    = 5'b00110, OP_LDSIG0J = 5'b01010, OP_LDSIG1J = 5'b01011,
    OP_DJNZ0   = 5'b11000, OP_DJNZ1   = 5'b11001, OP_DJNZ2 = 5'b11010,
    OP_DJNZ3   = 5'b11011, OP_JBOS0   = 5'b11100, OP_JBOS1 = 5'b11101,
    OP_NOP     = 5'b11111
  } csg_op_e;

  // Row group pattern bit positions.
  localparam int ROW_R1 = 0, ROW_R2 = 1, ROW_R3 = 2, ROW_RR = 3, ROW_SW = 4,
                 ROW_ISOLATE = 5, ROW_CONVST = 6, ROW_CLAMP = 7,
                 ROW_STIM_R = 8, ROW_STIM_L = 9, ROW_CHRG_SYNC = 10;
  // Line group pattern bit positions.
  localparam int LN_I1 = 0, LN_I2 = 1, LN_I3 = 2, LN_DG = 3, LN_SHUTDOWN = 4,
                 LN_EOS = 5, LN_RDOUT = 6, LN_FLUSH = 7, LN_15V = 8,
                 LN_CHRG_PMP = 9, LN_SPARE1 = 10;

  // Reset value of the concatenated control registers {reg4..reg0}: every
  // two-bit selector "01" except the R phi 2 selectors (bits 15..8) at "10";
  // the spare bits 32..28 and the undefined bits 54..49 are 0.
  localparam logic [54:0] CTRL_RESET = 55'h0000_AAAA_0555_AA55;

  // Logic-level CCD clocks leaving the CSG de-multiplexers, one bit per CCD
  // (index 0 = CCD A, 1 = CCD B). Names keep the active-low convention of the
  // pattern registers. The summing well selector drives both sides of a CCD.
  typedef struct packed {
    logic [1:0] r1l_n, r1r_n, r2l_n, r2r_n;
    logic [1:0] r3_n, rr_n, swl_n, swr_n;
    logic [1:0] i1_n, i2_n, i3_n, dg_n;
  } ccd_clk_t;

  // ---------------- Hamming(12,8) single-error-correcting code -------------
  // Codeword position p (1..12) is bit p-1. Check bits sit at positions 1, 2,
  // 4, 8; data bits d0..d7 at positions 3, 5, 6, 7, 9, 10, 11, 12.
  function automatic logic [11:0] ham_encode(input logic [7:0] d);
    logic [11:0] c;
    c = '0;
    c[2] = d[0]; c[4] = d[1]; c[5] = d[2]; c[6] = d[3];
    c[8] = d[4]; c[9] = d[5]; c[10] = d[6]; c[11] = d[7];
    c[0] = c[2] ^ c[4] ^ c[6] ^ c[8] ^ c[10];
    c[1] = c[2] ^ c[5] ^ c[6] ^ c[9] ^ c[10];
    c[3] = c[4] ^ c[5] ^ c[6] ^ c[11];
    c[7] = c[8] ^ c[9] ^ c[10] ^ c[11];
    return c;
  endfunction

  // Syndrome = position of a single flipped bit, 0 if the word is clean.
  function automatic logic [3:0] ham_syndrome(input logic [11:0] c);
    logic [3:0] s;
    s[0] = c[0] ^ c[2] ^ c[4] ^ c[6] ^ c[8] ^ c[10];
    s[1] = c[1] ^ c[2] ^ c[5] ^ c[6] ^ c[9] ^ c[10];
    s[2] = c[3] ^ c[4] ^ c[5] ^ c[6] ^ c[11];
    s[3] = c[7] ^ c[8] ^ c[9] ^ c[10] ^ c[11];
    return s;
  endfunction

  function automatic logic [11:0] ham_correct(input logic [11:0] c);
    logic [3:0]  s;
    logic [11:0] r;
    s = ham_syndrome(c);
    r = c;
    if (s != 4'd0 && s <= 4'd12) r[s - 4'd1] = ~r[s - 4'd1];
    return r;
  endfunction

  function automatic logic [7:0] ham_data(input logic [11:0] c);
    return {c[11], c[10], c[9], c[8], c[6], c[5], c[4], c[2]};
  endfunction

endpackage
