// cmd_interpreter: the ROE command interpreter.
//
// Takes command bytes one at a time (in_data/in_valid/in_ready) either from
// the ICU command link or, in default mode, from the default-mode PROM
// (in_prom = 1). The first byte of a command is its ID (0x40..0x49) and fixes
// its length (1 to 67 bytes). Commands are executed as their bytes arrive:
// Set up CSG (0x46) writes each of its 64 data bytes into the CSG RAM,
// Program CSG Windows (0x44) writes one byte, Setup AE (0x45) writes bytes 2..8
// to analogue PCB registers 0..6 (byte 9, the SEU counter, is read only). On
// the last byte the command completes: Reset (0x40) requests a hard reset, Exit
// default (0x41) leaves default mode, Start CSG (0x42) and CSG Sig (0x48) pulse
// the CSG, Dump CSG (0x43), HK request (0x47) and Dump AE parameter (0x49) read
// a byte and answer with a 0x30 or 0xC0 status message; 0x41, 0x42, 0x44,
// 0x45, 0x46 and 0x48 are acknowledged with 0x03 0x00.
//
// After reset the interpreter is in default mode: only Exit default is obeyed
// from the ICU; other ICU commands are counted through but neither executed nor
// answered. PROM commands are always executed and never answered. In idle mode
// an unknown ID is answered with 0x03 0x01 and dropped, and a command whose
// next byte does not arrive within TIMEOUT_CYC cycles (250 ms) is abandoned
// with 0x03 0xFF. Bytes are taken one per cycle except while a RAM, analogue
// bus, HK or status operation is in progress (in_ready low).
// Codes, lengths, field layouts, default-mode rule and error replies follow
// the board description; silently skipping ICU commands in default mode, not
// answering PROM commands, the RAM selector encoding (bit 7 of the block
// select byte: 0 program RAM, 1 pattern RAM) and reporting the CSG RAM SEU
// counter as AE parameter 7 are this design's choices.
module cmd_interpreter
  import roe_pkg::*;
#(
  parameter int unsigned TIMEOUT_CYC = 8_000_000   // 250 ms at 32 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  // command byte stream
  input  logic [7:0]  in_data,
  input  logic        in_valid,
  input  logic        in_prom,
  output logic        in_ready,
  output logic        default_mode,
  output logic        hard_rst,
  // CSG control
  output logic        csg_start,
  output logic [5:0]  csg_block,
  output logic [1:0]  csg_sig,
  // CSG RAM host port
  output logic        ram_req,
  output logic        ram_we,
  output logic        ram_bank,
  output logic [16:0] ram_addr,
  output logic [7:0]  ram_wdata,
  input  logic        ram_gnt,
  input  logic [7:0]  ram_rdata,
  input  logic        ram_rvalid,
  input  logic [7:0]  seu_count,
  // analogue PCB bus
  output logic        ae_req,
  output logic        ae_we,
  output logic [5:0]  ae_addr,
  output logic [7:0]  ae_wdata,
  input  logic        ae_done,
  input  logic [7:0]  ae_rdata,
  // housekeeping ADC
  output logic        hk_req,
  output logic [5:0]  hk_id,
  input  logic        hk_done,
  input  logic [7:0]  hk_data,
  // status replies
  output status_msg_t st_msg,
  output logic        st_valid,
  input  logic        st_ready
);
  typedef enum logic [3:0] {
    ST_RX, ST_RAMW, ST_AEW, ST_FIN, ST_RAMR, ST_RAMRD, ST_AER, ST_HK, ST_REPLY
  } st_e;

  st_e         st;
  logic [7:0]  hdr, b2, b3, b4, lastb;
  logic [6:0]  len, cnt;
  logic        prom, fin;
  logic [$clog2(TIMEOUT_CYC + 1)-1:0] tcnt;
  logic [6:0]  n;
  logic        exec_ok;
  logic [6:0]  hlen;

  assign in_ready = (st == ST_RX);
  assign n        = cnt + 1'b1;                 // 1-based number of the incoming byte
  assign hlen     = cmd_length(in_data);
  assign exec_ok  = prom || !default_mode || hdr == CMD_EXIT_DEF;
  assign st_valid = (st == ST_REPLY) && !prom;
  assign ram_req  = (st == ST_RAMW) || (st == ST_RAMR);
  assign ram_we   = (st == ST_RAMW);
  assign ram_bank = b2[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= ST_RX; hdr <= '0; b2 <= '0; b3 <= '0; b4 <= '0; lastb <= '0;
      len <= '0; cnt <= '0; prom <= 1'b0; fin <= 1'b0; tcnt <= '0;
      default_mode <= 1'b1; hard_rst <= 1'b0; csg_start <= 1'b0; csg_block <= '0;
      csg_sig <= '0; ram_addr <= '0; ram_wdata <= '0;
      ae_req <= 1'b0; ae_we <= 1'b0; ae_addr <= '0; ae_wdata <= '0;
      hk_req <= 1'b0; hk_id <= '0; st_msg <= '0;
    end else begin
      hard_rst  <= 1'b0;
      csg_start <= 1'b0;
      csg_sig   <= '0;
      ae_req    <= 1'b0;
      hk_req    <= 1'b0;
      case (st)
        ST_RX: begin
          if (in_valid) begin
            tcnt <= '0;
            if (cnt == 0) begin                       // header byte
              prom <= in_prom;
              hdr  <= in_data;
              if (hlen == 0) begin
                if (!in_prom && !default_mode) begin
                  st_msg <= '{id: ST_ACK_ERR, data: ERR_BAD_HDR};
                  st     <= ST_REPLY;
                end
              end else begin
                len <= hlen;
                if (hlen == 1) begin fin <= 1'b1; st <= ST_FIN; end
                else cnt <= 7'd1;
              end
            end else begin                            // body byte n
              cnt   <= n;
              lastb <= in_data;
              fin   <= (n == len);
              if (n == 2) b2 <= in_data;
              if (n == 3) b3 <= in_data;
              if (n == 4) b4 <= in_data;
              if (n == len) cnt <= '0;
              if (exec_ok) begin
                if (hdr == CMD_SETUP_CSG && n >= 4) begin
                  ram_addr  <= {b2[5:0], b3[4:0], 6'(n - 7'd4)};
                  ram_wdata <= in_data;
                  st        <= ST_RAMW;
                end else if (hdr == CMD_PROG_WIN && n == 5) begin
                  ram_addr  <= {b2[5:0], b3[4:0], b4[5:0]};
                  ram_wdata <= in_data;
                  st        <= ST_RAMW;
                end else if (hdr == CMD_SETUP_AE && n <= 8) begin
                  ae_addr  <= 6'(n - 7'd2);
                  ae_wdata <= in_data;
                  ae_we    <= 1'b1;
                  ae_req   <= 1'b1;
                  st       <= ST_AEW;
                end else if (n == len) st <= ST_FIN;
              end
            end
          end else if (cnt != 0 && !prom) begin          // waiting for the next byte
            if (tcnt == $bits(tcnt)'(TIMEOUT_CYC - 1)) begin
              tcnt <= '0;
              cnt  <= '0;
              if (!default_mode) begin
                st_msg <= '{id: ST_ACK_ERR, data: ERR_TIMEOUT};
                st     <= ST_REPLY;
              end
            end else tcnt <= tcnt + 1'b1;
          end
        end
        ST_RAMW: if (ram_gnt) st <= fin ? ST_FIN : ST_RX;
        ST_AEW:  if (ae_done) st <= fin ? ST_FIN : ST_RX;
        ST_FIN: begin
          fin    <= 1'b0;
          st_msg <= '{id: ST_ACK_ERR, data: ACK_OK};
          st     <= ST_REPLY;
          case (hdr)
            CMD_RESET: begin
              if (!default_mode && !prom) hard_rst <= 1'b1;
              st <= ST_RX;
            end
            CMD_EXIT_DEF: default_mode <= 1'b0;
            CMD_START_CSG: begin csg_start <= 1'b1; csg_block <= lastb[5:0]; end
            CMD_CSG_SIG:   csg_sig <= lastb[0] ? 2'b10 : 2'b01;
            CMD_DUMP_CSG: begin
              ram_addr <= {b2[5:0], b3[4:0], lastb[5:0]};
              st       <= ST_RAMR;
            end
            CMD_HK_REQ: begin hk_id <= lastb[5:0]; hk_req <= 1'b1; st <= ST_HK; end
            CMD_DUMP_AE: begin
              if (lastb[2:0] == 3'd7) st_msg <= '{id: ST_HK_AE, data: seu_count};
              else begin
                ae_addr <= {3'b000, lastb[2:0]};
                ae_we   <= 1'b0;
                ae_req  <= 1'b1;
                st      <= ST_AER;
              end
            end
            default: ;                                // 0x44, 0x45, 0x46: ACK
          endcase
        end
        ST_RAMR:  if (ram_gnt) st <= ST_RAMRD;
        ST_RAMRD: if (ram_rvalid) begin
          st_msg <= '{id: ST_DUMP_CSG, data: ram_rdata};
          st     <= ST_REPLY;
        end
        ST_AER: if (ae_done) begin
          st_msg <= '{id: ST_HK_AE, data: ae_rdata};
          st     <= ST_REPLY;
        end
        ST_HK: if (hk_done) begin
          st_msg <= '{id: ST_HK_AE, data: hk_data};
          st     <= ST_REPLY;
        end
        ST_REPLY: if (prom || st_ready) st <= ST_RX;
        default: st <= ST_RX;
      endcase
    end
  end
endmodule
