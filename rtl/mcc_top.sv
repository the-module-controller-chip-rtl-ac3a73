// mcc_top: the Module Controller Chip (MCC), demonstrator version.
//
// One MCC controls a pixel detector module of 16 front-end (FE) chips. It
//  - receives the ROD's serial command stream on DCI and decodes triggers (LV1),
//    SYNC and configuration commands (command decoder);
//  - passes triggers and SYNC to the FE chips, limits the number of pending
//    events and re-synchronises the module on request or on error (TTC);
//  - forwards configuration bit streams to the FE chips on DAO/LD/CCK and holds
//    its own registers (command decoder, register bank);
//  - receives the 16 FE data links into 16 FIFOs (receiver channels) and builds
//    one event per trigger out of them, sent serially on DTO (event builder);
//  - in transparent mode (TM) connects the FE lines straight to external pins
//    (front-end port).
// The block structure follows the paper's MCC block diagram. The demonstrator has
// electrical links, so there is no bi-phase mark coding of DCI/DTO, and the clock
// arrives on its own pin: clk here is that clock and is also the FE chips'
// bunch-crossing clock XCK (the clock tree itself is physical, not logic).
// The paper's ROD interface can also send data on a second line (DTO2) when the
// bandwidth requires it, without saying how the stream is split; this design
// has the one DTO line.
// One DTO output line is shared, in priority order, by event data, register
// read-back and FE read-back; event building waits while a read-back is on it.
// While an FE configuration transfer runs (and for RX_QUIET clocks after it) the
// data receivers ignore their inputs, since an FE chip answers a read-back on its
// data line (own choice: the paper does not say how the two uses are separated).
//
// Timing: everything runs on clk (40 MHz); FE configuration at clk/8.
// Reset: asynchronous, active low; after reset the module is not taking data
// until the ROD sends the Data-Take (RUN) command.
// Lint notes: rst_n is both the asynchronous reset of the flip-flops and the
// disable condition of the blocks' assertions (not logic); some package constants
// and bits of shared word types are unused in some blocks.
module mcc_top
  import mcc_pkg::*;
(
  input  logic            clk,       // module clock pin (XCKIN / CK)
  input  logic            rst_n,
  // ROD side
  input  logic            dci,
  output logic            dto,
  // FE side
  input  logic [N_FE-1:0] dti,
  output logic            fe_xck,
  output logic            fe_lv1,
  output logic            fe_sync,
  output logic            fe_dao,
  output logic            fe_ld,
  output logic            fe_cck,
  // transparent mode
  input  logic            tm,
  input  logic            lv1t,
  input  logic            synct,
  input  logic            ldt,
  input  logic            cckt
);

  // configuration
  logic               tot_en, autosync_en, run;
  logic [3:0]         max_pending, burst_m1, fe_sel;
  logic [N_FE-1:0]    fe_mask;
  logic [REG_W-1:0]   cmd_len, data_len, suppressed;
  // command decoder
  logic               lv1_cmd, sync_cmd, reg_we, reg_rd, fe_busy;
  logic [3:0]         reg_addr;
  logic [REG_W-1:0]   reg_wdata;
  logic               dao, ld, cck, cfg_dto;
  // TTC
  logic               lv1_out, sync_out, flush, sync_warn;
  logic [4:0]         pending;
  // receivers and builder
  logic [N_FE-1:0]    core_dti;
  logic               sel_dti;
  fifo_word_t         rdata [N_FE];
  logic [N_FE-1:0]    avail, re, eoe_valid, rx_warn, rx_err, hit_err;
  logic [N_FE-1:0][LV1_W-1:0] eoe_lv1;
  logic               event_done, eb_idle, eb_ready, eb_dout;
  logic [EVNUM_W-1:0] lv1_count;
  logic               rd_busy, rb_dout;
  logic [3:0]         quiet_cnt;
  logic               rx_quiet;

  assign fe_xck = clk;

  mcc_command_decoder u_cmd (
    .clk, .rst_n,
    .dci       (dci & ~tm),
    .cmd_len, .data_len,
    .fe_din    (sel_dti),
    .lv1_cmd, .sync_cmd, .run,
    .reg_we, .reg_addr, .reg_wdata, .reg_rd,
    .dao, .ld, .cck, .cfg_dto, .fe_busy
  );

  mcc_register_bank u_regs (
    .clk, .rst_n,
    .we (reg_we), .waddr (reg_addr), .wdata (reg_wdata),
    .rd_start (reg_rd), .rd_addr (reg_addr),
    .tx_allow (eb_idle && !eb_ready && !fe_busy),
    .dout     (rb_dout),
    .rd_busy,
    .run,
    .warn_set (rx_warn),
    .err_set  (rx_err | hit_err),
    .clear_status (flush),
    .pending, .lv1_count, .suppressed,
    .tot_en, .autosync_en, .max_pending, .burst_m1, .fe_mask,
    .cmd_len, .data_len, .fe_sel
  );

  mcc_ttc u_ttc (
    .clk, .rst_n, .run, .lv1_cmd, .sync_cmd,
    .max_pending, .burst_m1, .autosync_en,
    .error          (|{rx_err, hit_err}),
    .event_done,
    .eb_idle,
    .eb_event_ready (eb_ready),
    .lv1_out, .sync_out, .flush, .sync_warn, .pending, .suppressed
  );

  // receivers ignore DTI during FE configuration transfers and shortly after
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       quiet_cnt <= '0;
    else if (fe_busy) quiet_cnt <= '1;
    else if (quiet_cnt != '0) quiet_cnt <= quiet_cnt - 4'd1;
  end
  assign rx_quiet = fe_busy || quiet_cnt != '0;

  for (genvar i = 0; i < N_FE; i++) begin : g_rx
    mcc_rx_channel u_ch (
      .clk, .rst_n, .flush, .tot_en,
      .masked    (fe_mask[i]),
      .din       (core_dti[i] && !rx_quiet),
      .lv1_sent  (lv1_out),
      .re        (re[i]),
      .rdata     (rdata[i]),
      .avail     (avail[i]),
      .eoe_valid (eoe_valid[i]),
      .eoe_lv1   (eoe_lv1[i]),
      .warn      (rx_warn[i]),
      .err       (rx_err[i])
    );
  end

  mcc_event_builder u_eb (
    .clk, .rst_n, .flush, .tot_en,
    .mask (fe_mask),
    .rdata, .avail, .re, .eoe_valid, .eoe_lv1,
    .lv1_sent (lv1_out),
    .event_done,
    .sync_warn,
    .hold (rd_busy || fe_busy),
    .idle (eb_idle),
    .event_ready (eb_ready),
    .hit_err,
    .lv1_count,
    .dout (eb_dout)
  );

  mcc_fe_port u_port (
    .clk, .rst_n, .tm, .fe_sel,
    .dti, .fe_lv1, .fe_sync, .fe_dao, .fe_ld, .fe_cck,
    .lv1t, .synct, .dci, .ldt, .cckt,
    .dto,
    .core_dti, .core_sel_dti (sel_dti),
    .core_lv1 (lv1_out), .core_sync (sync_out),
    .core_dao (dao), .core_ld (ld), .core_cck (cck),
    .core_dto (eb_dout | rb_dout | cfg_dto)
  );

endmodule
