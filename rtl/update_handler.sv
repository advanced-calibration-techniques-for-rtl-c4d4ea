// Update handler (UH): start-up sequencing and transparent recalibration.
//
// After reset it brings the PHY up in order: wait for the DLL to lock, run the
// SSTL impedance search and write the result to the drivers, let the SDRAM be
// initialised, run the DQ deskew training, then hand the interface to the
// memory controller (phy_ready). In phy_ready it answers DFI controller-update
// requests, and it watches the DFI command bus for Refresh. Inside each
// refresh interval it:
//   * every sstl_period cycles, alternately starts a new SSTL impedance search
//     (one interval) or writes the codes found by the previous search to the
//     drivers (the next interval), because one interval is too short for both;
//   * asks the RCDLL for a new period measurement and compares it with the
//     reference one. If the change exceeds delta_n taps it requests a DFI PHY
//     update, and when the controller acknowledges it reruns deskew training
//     (as a recalibration) and takes the new count as reference.
//
// Outputs are Moore outputs of the state; each request is held until the
// matching done input, so the handshake with every engine is req-level /
// done-pulse. ctrl_sel and wr_sel hand command and write-data paths to the
// calibration logic (1) or to the controller (0). upd_busy is low only while
// the controller owns the interface undisturbed.
//
// States, transitions and their conditions follow the UH state diagram.
// Where the diagram prints no condition (leaving sstl_upd_wt for sstl_upd2
// or straight for dll_mes, and a change of exactly delta_n) this design
// chooses: write pending SSTL codes first, otherwise measure; equal means no
// recalibration, matching "exceeds the specified n value" in the text.
`timescale 1ps/1ps
module update_handler
  import ddr_phy_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  delta_n,
  input  logic [15:0] sstl_period,
  // RCDLL
  input  logic        dll_done,
  output logic        tdc_meas,
  input  logic        tdc_meas_done,
  input  logic [7:0]  period_taps,
  // SSTL impedance calibration
  output logic        sstl_calib_act,
  input  logic        sstl_fsm_done,
  input  logic        sstl_fsm_busy,
  output logic        sstl_calib_wr,
  input  logic        sstl_calib_done,
  // SDRAM initialisation
  output logic        sdram_init,
  input  logic        sdram_init_done,
  // deskew training
  output logic        rd_train,
  output logic        rd_retrain,
  input  logic        rd_train_done,
  // DFI
  input  ddr_cmd_t    dfi_cmd,
  input  logic        dfi_ctrlupd_req,
  output logic        dfi_ctrlupd_ack,
  output logic        dfi_phyupd_req,
  input  logic        dfi_phyupd_ack,
  output logic        dfi_init_complete,
  // path selects and status
  output logic        ctrl_sel,
  output logic        wr_sel,
  output logic        upd_busy,
  output logic [7:0]  ref_taps
);
  typedef enum logic [3:0] {
    UPD_IDLE, SSTL_FSM_I, SSTL_UPD, PHY_INIT, CALIB_INIT, PHY_READY,
    GEN_DFI_ACK, SSTL_UPD_WT, SSTL_FSM_I2, SSTL_UPD2, DLL_MES, CHK_RD_TR,
    GEN_DFI_UPD, CALIB_INIT2
  } state_t;

  state_t      state;
  logic [15:0] counter;
  logic        counter_done;
  logic        sstl_pending;   // codes computed, not yet written to the drivers
  logic [7:0]  new_taps;
  logic [7:0]  dtap;
  logic        cmd_ref;

  assign cmd_ref      = (dfi_cmd == CMD_REF);
  assign counter_done = (counter >= sstl_period);
  assign dtap         = (new_taps > ref_taps) ? (new_taps - ref_taps) : (ref_taps - new_taps);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state             <= UPD_IDLE;
      counter           <= '0;
      sstl_pending      <= 1'b0;
      ref_taps          <= '0;
      new_taps          <= '0;
      dfi_init_complete <= 1'b0;
    end else begin
      if (!counter_done) counter <= counter + 1'b1;
      unique case (state)
        UPD_IDLE:    if (dll_done) begin
                       ref_taps <= period_taps;
                       state    <= SSTL_FSM_I;
                     end
        SSTL_FSM_I:  if (sstl_fsm_done)   state <= SSTL_UPD;
        SSTL_UPD:    if (sstl_calib_done) state <= PHY_INIT;
        PHY_INIT:    if (sdram_init_done) state <= CALIB_INIT;
        CALIB_INIT:  if (rd_train_done) begin
                       dfi_init_complete <= 1'b1;
                       counter           <= '0;
                       state             <= PHY_READY;
                     end
        PHY_READY:   if (dfi_ctrlupd_req) state <= GEN_DFI_ACK;
                     else if (cmd_ref)    state <= SSTL_UPD_WT;
        GEN_DFI_ACK: if (!dfi_ctrlupd_req) state <= PHY_READY;
        SSTL_UPD_WT: if (sstl_pending)                       state <= SSTL_UPD2;
                     else if (counter_done && !sstl_fsm_busy) state <= SSTL_FSM_I2;
                     else                                     state <= DLL_MES;
        SSTL_FSM_I2: if (sstl_fsm_done) begin
                       sstl_pending <= 1'b1;
                       state        <= DLL_MES;
                     end
        SSTL_UPD2:   if (sstl_calib_done) begin
                       sstl_pending <= 1'b0;
                       counter      <= '0;
                       state        <= DLL_MES;
                     end
        DLL_MES:     if (tdc_meas_done) begin
                       new_taps <= period_taps;
                       state    <= CHK_RD_TR;
                     end
        CHK_RD_TR:   if (dtap > {4'd0, delta_n}) begin
                       ref_taps <= new_taps;
                       state    <= GEN_DFI_UPD;
                     end else state <= PHY_READY;
        GEN_DFI_UPD: if (dfi_phyupd_ack) state <= CALIB_INIT2;
        CALIB_INIT2: if (rd_train_done)  state <= PHY_READY;
        default:     state <= UPD_IDLE;
      endcase
    end

  always_comb begin
    sstl_calib_act  = (state == SSTL_FSM_I) || (state == SSTL_FSM_I2);
    sstl_calib_wr   = (state == SSTL_UPD)   || (state == SSTL_UPD2);
    sdram_init      = (state == PHY_INIT);
    rd_train        = (state == CALIB_INIT);
    rd_retrain      = (state == CALIB_INIT2);
    tdc_meas        = (state == DLL_MES);
    dfi_ctrlupd_ack = (state == GEN_DFI_ACK);
    dfi_phyupd_req  = (state == GEN_DFI_UPD) || (state == CALIB_INIT2);
    ctrl_sel        = (state == CALIB_INIT) || (state == CALIB_INIT2);
    wr_sel          = (state == CALIB_INIT) || (state == CALIB_INIT2);
    upd_busy        = !((state == PHY_READY) || (state == GEN_DFI_ACK));
  end
endmodule
