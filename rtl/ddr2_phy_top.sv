// DDR2 PHY byte lane with dynamic calibration: top level.
//
// One strobe group (eight DQ lines, one DQS) of a DFI-to-DDR2 PHY with three
// calibration mechanisms that also run during operation:
//   * DQS strobe qualification (DSMS in the DQS slice): a mask derived from
//     dfi_rddata_en and the count of received strobe pulses removes pre- and
//     postamble glitches;
//   * per-bit deskew (deskew_engine + cal_seq): nine PDLs are trained so that
//     all DQ lines line up and the strobe sits in the middle of their common
//     valid window;
//   * SSTL driver impedance calibration (sstl_calib against sstl_dummy).
// The update handler sequences start-up and, inside refresh intervals,
// re-measures the clock period with the RCDLL and starts a recalibration
// through the DFI PHY-update handshake when the delay of a tap has drifted.
//
// Interfaces: DFI towards the memory controller (command bundle, write data,
// read data, update handshakes, init complete), a configuration write port,
// and the SDRAM side as separate output / output-enable / input signals for
// DQ and DQS (the SSTL pads themselves are not part of this RTL), the command
// bundle, and the calibrated driver codes. sdram_init / sdram_init_done hand
// the SDRAM power-up sequence to whoever performs it. tap_ps and pvt_pct only
// feed the behavioural models of the delay lines and of the impedance replica
// (delay of one tap; resistance scale in percent).
// DFI data words: dfi_wrdata[2i] is the first beat of line i,
// dfi_rddata[2i+1] the first beat of line i.
// Timing: the mask opens 1 + mask_dly cycles after dfi_rddata_en is sampled;
// mask_dly must be set for the board so that the mask rises inside the read
// preamble (CL = rd_lat + mask_dly with a flight time of about 0.7 clock in
// the system test).
// Block split, calibration sequence, state names of the update handler and
// the 64-tap delay lines follow the published architecture; the DFI bit
// order, the register map, the handshake timing and the behavioural models
// are this design's own choices.
`timescale 1ps/1ps
module ddr2_phy_top
  import ddr_phy_pkg::*;
#(
  parameter int unsigned FIFO_AW = 3,
  parameter int unsigned ZQ_CODE_W = ZQ_W
) (
  input  logic                 dfi_clk,
  input  logic                 rst_n,
  // DFI
  input  ddr_ctrl_t            dfi_ctrl,
  input  logic                 dfi_wrdata_en,
  input  logic [DFI_DW-1:0]    dfi_wrdata,
  input  logic                 dfi_rddata_en,
  output logic [DFI_DW-1:0]    dfi_rddata,
  output logic                 dfi_rddata_valid,
  input  logic                 dfi_ctrlupd_req,
  output logic                 dfi_ctrlupd_ack,
  output logic                 dfi_phyupd_req,
  input  logic                 dfi_phyupd_ack,
  output logic                 dfi_init_complete,
  // configuration
  input  logic                 cfg_we,
  input  logic [3:0]           cfg_addr,
  input  logic [15:0]          cfg_wdata,
  output logic [15:0]          cfg_rdata,
  // SDRAM power-up sequence
  output logic                 sdram_init,
  input  logic                 sdram_init_done,
  // SDRAM side
  output ddr_ctrl_t            ddr_ctrl,
  output logic [DQ_W-1:0]      dq_out,
  output logic                 dq_oe,
  input  logic [DQ_W-1:0]      dq_in,
  output logic                 dqs_out,
  output logic                 dqs_oe,
  output logic                 dqs_ie,
  input  logic                 dqs_in,
  output logic [ZQ_CODE_W-1:0] drv_p_code,
  output logic [ZQ_CODE_W-1:0] drv_n_code,
  // status
  output logic                 upd_busy,
  output logic                 deskew_locked,
  output logic                 deskew_fail,
  output logic [7:0]           period_taps,
  output tap_t                 dqs_taps_q,
  output tap_t [DQ_W-1:0]      dq_taps_q,
  output tap_t                 deskew_window,
  output logic                 dsms_mask,
  output logic [7:0]           ref_taps,
  // behavioural-model inputs
  input  logic [15:0]          tap_ps,
  input  logic [7:0]           pvt_pct
);
  logic dfi_clk0, dfi_clk90;
  phy_cfg_t cfg;

  // RCDLL
  logic dll_done, tdc_meas, tdc_meas_done;
  tap_t deg90_taps;

  // update handler
  logic sstl_calib_act, sstl_calib_wr, sstl_fsm_done, sstl_fsm_busy, sstl_calib_done;
  logic rd_train, rd_retrain, rd_train_done;
  logic ctrl_sel, wr_sel;

  // deskew and its sequencer
  logic               seq_req, seq_ack, seq_rd_ok;
  cal_burst_t         seq_burst;
  logic [BL*DQ_W-1:0] seq_rdata;
  tap_t [DQ_W-1:0]    dq_taps;
  tap_t               dqs_taps;
  logic               taps_load;
  ddr_ctrl_t          cal_ctrl;
  logic               calib_wrdata_en, calib_rddata_en;
  logic [DFI_DW-1:0]  calib_wrdata;

  // SSTL
  logic [ZQ_CODE_W-1:0] p_trial, n_trial;
  logic                 cmp_p, cmp_n;

  // DQS slice
  logic masked_dqs90, masked_dqs90_d;
  logic tx_en, rx_en;
  logic [DQ_W-1:0] lane_valid;

  cfg_regs u_cfg (
    .clk(dfi_clk0), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
    .cfg_wdata(cfg_wdata), .cfg_rdata(cfg_rdata), .cfg(cfg)
  );

  rcdll u_rcdll (
    .dfi_clk(dfi_clk), .rst_n(rst_n), .tap_ps(tap_ps), .tdc_meas(tdc_meas),
    .dfi_clk0(dfi_clk0), .dfi_clk90(dfi_clk90), .dll_done(dll_done),
    .tdc_meas_done(tdc_meas_done), .period_taps(period_taps), .deg90_taps(deg90_taps)
  );

  update_handler u_uh (
    .clk(dfi_clk0), .rst_n(rst_n), .delta_n(cfg.delta_n), .sstl_period(cfg.sstl_period),
    .dll_done(dll_done), .tdc_meas(tdc_meas), .tdc_meas_done(tdc_meas_done),
    .period_taps(period_taps),
    .sstl_calib_act(sstl_calib_act), .sstl_fsm_done(sstl_fsm_done),
    .sstl_fsm_busy(sstl_fsm_busy), .sstl_calib_wr(sstl_calib_wr),
    .sstl_calib_done(sstl_calib_done),
    .sdram_init(sdram_init), .sdram_init_done(sdram_init_done),
    .rd_train(rd_train), .rd_retrain(rd_retrain), .rd_train_done(rd_train_done),
    .dfi_cmd(dfi_ctrl.cmd), .dfi_ctrlupd_req(dfi_ctrlupd_req),
    .dfi_ctrlupd_ack(dfi_ctrlupd_ack), .dfi_phyupd_req(dfi_phyupd_req),
    .dfi_phyupd_ack(dfi_phyupd_ack), .dfi_init_complete(dfi_init_complete),
    .ctrl_sel(ctrl_sel), .wr_sel(wr_sel), .upd_busy(upd_busy), .ref_taps(ref_taps)
  );

  sstl_calib #(.CODE_W(ZQ_CODE_W)) u_zq (
    .clk(dfi_clk0), .rst_n(rst_n), .act(sstl_calib_act), .wr(sstl_calib_wr),
    .cmp_p(cmp_p), .cmp_n(cmp_n), .p_trial(p_trial), .n_trial(n_trial),
    .p_code_new(), .n_code_new(),
    .p_code(drv_p_code), .n_code(drv_n_code), .busy(sstl_fsm_busy),
    .fsm_done(sstl_fsm_done), .calib_done(sstl_calib_done)
  );

  sstl_dummy #(.CODE_W(ZQ_CODE_W)) u_dummy (
    .p_code(p_trial), .n_code(n_trial), .pvt_pct(pvt_pct), .cmp_p(cmp_p), .cmp_n(cmp_n)
  );

  deskew_engine u_deskew (
    .clk(dfi_clk0), .rst_n(rst_n), .clb_req(rd_train), .reclb_req(rd_retrain),
    .pattern(cfg.pattern), .init_dq_taps(cfg.init_dq_taps), .init_dqs_taps(cfg.init_dqs_taps),
    .seq_req(seq_req), .seq_burst(seq_burst), .seq_ack(seq_ack), .seq_rdata(seq_rdata),
    .seq_rd_ok(seq_rd_ok), .dq_taps(dq_taps), .dqs_taps(dqs_taps), .taps_load(taps_load),
    .busy(), .done(rd_train_done), .locked(deskew_locked),
    .lock_fail(deskew_fail), .window_taps(deskew_window)
  );

  cal_seq u_seq (
    .clk(dfi_clk0), .rst_n(rst_n), .wr_lat(cfg.wr_lat), .rd_lat(cfg.rd_lat),
    .rd_timeout(cfg.rd_timeout), .req(seq_req), .burst(seq_burst), .ack(seq_ack),
    .rdata(seq_rdata), .rd_ok(seq_rd_ok), .ctrl(cal_ctrl),
    .calib_wrdata_en(calib_wrdata_en), .calib_wrdata(calib_wrdata),
    .calib_rddata_en(calib_rddata_en), .dfi_rddata(dfi_rddata),
    .dfi_rddata_valid(dfi_rddata_valid)
  );

  addr_ctrl u_ac (
    .dfi_clk0(dfi_clk0), .rst_n(rst_n), .ctrl_sel(ctrl_sel),
    .dfi_ctrl(dfi_ctrl), .cal_ctrl(cal_ctrl), .ddr_ctrl(ddr_ctrl)
  );

  dqs_bitslice u_dqs (
    .dfi_clk0(dfi_clk0), .reset_n(rst_n),
    .read_dqs(dqs_in & rx_en),
    .dfi_rddata_en(ctrl_sel ? calib_rddata_en : dfi_rddata_en),
    .mask_dly(cfg.mask_dly), .pdl_taps(dqs_taps), .select_pdl(taps_load),
    .deg90_taps(deg90_taps), .tap_ps(tap_ps),
    .mask(dsms_mask), .masked_dqs(), .masked_dqs90(masked_dqs90),
    .masked_dqs90_d(masked_dqs90_d), .pdl_taps_q(dqs_taps_q),
    .sel_wd(wr_sel), .dfi_wrdata_en(dfi_wrdata_en), .calib_wrdata_en(calib_wrdata_en),
    .write_dqs(dqs_out), .tx_en(tx_en), .rx_en(rx_en)
  );

  for (genvar i = 0; i < DQ_W; i++) begin : g_dq
    dq_bitslice #(.FIFO_AW(FIFO_AW)) u_dq (
      .dfi_clk0(dfi_clk0), .dfi_clk90(dfi_clk90), .reset_n(rst_n),
      .sel_wd(wr_sel), .dfi_wrdata(dfi_wrdata[2*i +: 2]),
      .calib_wrdata(calib_wrdata[2*i +: 2]), .write_dq(dq_out[i]),
      .read_dq(dq_in[i]), .masked_dqs90(masked_dqs90), .masked_dqs90_d(masked_dqs90_d),
      .pdl_taps(dq_taps[i]), .select_pdl(taps_load), .tap_ps(tap_ps),
      .rinc(1'b1), .fifo_reset_n(1'b1),
      .dfi_rddata(dfi_rddata[2*i +: 2]), .dfi_rddata_valid(lane_valid[i]),
      .pdl_taps_q(dq_taps_q[i])
    );
  end

  assign dfi_rddata_valid = &lane_valid;
  assign dq_oe            = tx_en;
  assign dqs_oe           = tx_en;
  assign dqs_ie           = rx_en;
endmodule
