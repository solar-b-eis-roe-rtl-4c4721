// roe_top: the EIS read-out electronics (ROE) digital board.
//
// The board sits between the instrument control unit (ICU) and the CCD
// camera. Commands arrive from the ICU on a 9600 baud serial link (cmd_rx),
// are decoded by the command interpreter and program the clock sequence
// generator (CSG), the analogue PCB registers and the housekeeping ADC;
// replies and end-of-sequence reports return on the 9600 baud status link
// (status_tx). The CSG is a micro-programmed sequencer that reads 16-bit
// instructions from two ECC-protected 128K x 8 RAMs and produces the CCD row
// and line clocks and the analogue chain timing (ADC convert, clamp, isolate,
// stims, end of sequence). The science data from the four analogue chains
// leave on the 32 Mbit/s data-strobe link (sci_data, sci_strobe).
//
// After power-on or a Reset command the board is in default mode: the
// default-mode controller loads the PROM's commands and then runs flush,
// integration, readout, gap, readout for ever, until the ICU sends Exit
// default.
//
// Interface: clk is the 32 MHz system clock, por_n the power-on reset. The
// differential line drivers and receivers (RS422, LVDS) and the 13.5 V CCD
// clock drivers are outside: the ports carry their logic-level signals. The
// back-plane data bus D is split into bp_d_out/bp_d_oe/bp_d_in. The analogue
// chains' converted pixels enter on adc_valid/adc_data (this transmitter sits
// in the analogue PCB's FPGA on the flight board and is included here so the
// science path is complete). default_mode and csg_busy are status outputs for
// observation. Block structure and signal set follow the board description;
// the CSG, controller and link details are described in each module.
// Some sub-block outputs are left unconnected on purpose: the command UART's
// framing and overrun flags, the default controller's phase, the back-plane
// and HK busy flags, the RAM read strobe echo and the science link's overflow
// and Period of Silence flags. The board's status list has no message that
// reports them, so they are only visible inside the design for debugging.
module roe_top
  import roe_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 32_000_000,
  parameter int unsigned BAUD        = 9600,
  parameter int unsigned TIMEOUT_CYC = 8_000_000,     // 250 ms
  parameter int unsigned INTEG_CYC   = 256_000_000,   // 8 s
  parameter int unsigned GAP_CYC     = 384_000,       // 12 ms
  parameter int unsigned TX_POS_CYC  = 320_000,       // 10 ms
  parameter int unsigned HK_SETTLE   = 320,           // 10 us
  parameter int unsigned PROM_DEPTH  = 2048,
  parameter string       PROM_FILE   = "rtl/default_prom.hex"
) (
  input  logic        clk,
  input  logic        por_n,
  // ICU links (logic level)
  input  logic        cmd_rx,
  output logic        status_tx,
  output logic        sci_data,
  output logic        sci_strobe,
  // analogue chains' converted pixels
  input  logic        adc_valid,
  input  logic [13:0] adc_data [4],
  // back-plane
  output logic        sys_reset_n,
  output logic [5:0]  bp_a,
  output logic [7:0]  bp_d_out,
  output logic        bp_d_oe,
  input  logic [7:0]  bp_d_in,
  output logic        bp_wr_en,
  output logic        bp_rd_en,
  output logic [6:0]  hk_mux_sel,
  output logic        hk_conv_start_n,
  output logic        hk_shut_down_n,
  output logic        hk_oe_n,
  input  logic        hk_data_rdy,
  output logic        convst_n,
  output logic        clamp_n,
  output logic        isolate,
  output logic        shut_down_n,
  output logic        stim_r,
  output logic        stim_l,
  output logic        eos,
  output logic        v15_on,
  output logic        chrg_pump,
  output ccd_clk_t    ccd,
  // observation
  output logic        default_mode,
  output logic        csg_busy
);
  logic rst_n, hard_rst;

  reset_gen u_rst (.clk, .por_n, .hard_rst, .rst_n);
  assign sys_reset_n = rst_n;

  // ---------------- command link and byte source selection -----------------
  logic [7:0] rx_data;
  logic       rx_valid, rx_ready, rx_ferr, rx_ovr;
  logic [7:0] pr_data;
  logic       pr_valid, pr_ready, replaying;
  logic [7:0] in_data;
  logic       in_valid, in_ready;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst_n, .rx(cmd_rx), .rx_data, .rx_valid, .rx_ready,
    .frame_err(rx_ferr), .overrun(rx_ovr)
  );

  assign in_data  = replaying ? pr_data : rx_data;
  assign in_valid = replaying ? pr_valid : rx_valid;
  assign pr_ready = replaying && in_ready;
  assign rx_ready = !replaying && in_ready;

  // ---------------- default-mode PROM and controller ------------------------
  logic [$clog2(PROM_DEPTH)-1:0] prom_addr;
  logic [7:0] prom_data;
  logic       dm_start;
  logic [5:0] dm_block;
  logic [1:0] dm_phase;

  default_prom #(.DEPTH(PROM_DEPTH), .FILE(PROM_FILE)) u_prom (
    .clk, .addr(prom_addr), .data(prom_data)
  );

  default_mode_ctrl #(.PROM_DEPTH(PROM_DEPTH), .INTEG_CYC(INTEG_CYC), .GAP_CYC(GAP_CYC)) u_dm (
    .clk, .rst_n, .default_mode, .prom_addr, .prom_data,
    .out_data(pr_data), .out_valid(pr_valid), .out_ready(pr_ready), .replaying,
    .csg_start(dm_start), .csg_block(dm_block), .csg_busy, .phase(dm_phase)
  );

  // ---------------- command interpreter -------------------------------------
  logic        ci_start;
  logic [5:0]  ci_block;
  logic [1:0]  ci_sig;
  logic        ram_req, ram_we, ram_bank, ram_gnt, ram_rvalid;
  logic [16:0] ram_addr;
  logic [7:0]  ram_wdata, ram_rdata, seu_count;
  logic        ae_req, ae_we, ae_done, ae_busy;
  logic [5:0]  ae_addr;
  logic [7:0]  ae_wdata, ae_rdata;
  logic        hk_req, hk_done, hk_busy;
  logic [5:0]  hk_id;
  logic [7:0]  hk_data;
  status_msg_t ci_msg, eos_msg;
  logic        ci_valid, ci_ready, eos_valid, eos_ready;

  cmd_interpreter #(.TIMEOUT_CYC(TIMEOUT_CYC)) u_ci (
    .clk, .rst_n, .in_data, .in_valid, .in_prom(replaying), .in_ready,
    .default_mode, .hard_rst,
    .csg_start(ci_start), .csg_block(ci_block), .csg_sig(ci_sig),
    .ram_req, .ram_we, .ram_bank, .ram_addr, .ram_wdata, .ram_gnt, .ram_rdata, .ram_rvalid,
    .seu_count,
    .ae_req, .ae_we, .ae_addr, .ae_wdata, .ae_done, .ae_rdata,
    .hk_req, .hk_id, .hk_done, .hk_data,
    .st_msg(ci_msg), .st_valid(ci_valid), .st_ready(ci_ready)
  );

  ae_bus_if u_ae (
    .clk, .rst_n, .req(ae_req), .we(ae_we), .addr(ae_addr), .wdata(ae_wdata),
    .busy(ae_busy), .done(ae_done), .rdata(ae_rdata),
    .bp_a, .bp_d_out, .bp_d_oe, .bp_d_in, .bp_wr_en, .bp_rd_en
  );

  hk_adc_if #(.SETTLE(HK_SETTLE)) u_hk (
    .clk, .rst_n, .req(hk_req), .id(hk_id), .busy(hk_busy), .done(hk_done), .data(hk_data),
    .hk_mux_sel, .hk_conv_start_n, .hk_shut_down_n, .hk_oe_n, .hk_data_rdy, .bp_d_in
  );

  status_link #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_st (
    .clk, .rst_n, .a_msg(ci_msg), .a_valid(ci_valid), .a_ready(ci_ready),
    .b_msg(eos_msg), .b_valid(eos_valid), .b_ready(eos_ready), .tx(status_tx)
  );

  // ---------------- CSG and its RAM ------------------------------------------
  logic        seq_rd, seq_valid, seq_err;
  logic [16:0] seq_addr;
  logic [7:0]  seq_prog, seq_pat;
  logic [10:0] row_pat, line_pat;

  csg_ram u_ram (
    .clk, .rst_n, .seq_rd, .seq_addr, .seq_prog, .seq_pat, .seq_valid, .seq_err,
    .host_req(ram_req), .host_we(ram_we), .host_bank(ram_bank), .host_addr(ram_addr),
    .host_wdata(ram_wdata), .host_gnt(ram_gnt), .host_rdata(ram_rdata),
    .host_rvalid(ram_rvalid), .seu_count
  );

  csg u_csg (
    .clk, .rst_n,
    .start(ci_start || dm_start), .start_block(ci_start ? ci_block : dm_block), .sig(ci_sig),
    .ram_rd(seq_rd), .ram_addr(seq_addr), .ram_prog(seq_prog), .ram_pat(seq_pat),
    .ram_err(seq_err), .row_pat, .line_pat, .ccd, .busy(csg_busy),
    .eos_msg, .eos_valid, .eos_ready
  );

  assign convst_n    = row_pat[ROW_CONVST];
  assign clamp_n     = row_pat[ROW_CLAMP];
  assign isolate     = row_pat[ROW_ISOLATE];
  assign stim_r      = row_pat[ROW_STIM_R];
  assign stim_l      = row_pat[ROW_STIM_L];
  assign eos         = line_pat[LN_EOS];
  assign shut_down_n = !line_pat[LN_SHUTDOWN];
  assign v15_on      = line_pat[LN_15V];

  charge_pump_sel #(.CLK_HZ(CLK_HZ)) u_cp (
    .clk, .rst_n, .chrg_pmp(line_pat[LN_CHRG_PMP]), .chrg_sync(row_pat[ROW_CHRG_SYNC]),
    .pump(chrg_pump)
  );

  // ---------------- science link ----------------------------------------------
  logic eos_d, sci_ovf, sci_hold;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) eos_d <= 1'b0;
    else        eos_d <= eos;
  end

  science_link_tx #(.POS_CYC(TX_POS_CYC)) u_sci (
    .clk, .rst_n, .pix_valid(adc_valid), .pix_data(adc_data), .eof(eos && !eos_d),
    .sd(sci_data), .ss(sci_strobe), .overflow(sci_ovf), .holding(sci_hold)
  );
endmodule
