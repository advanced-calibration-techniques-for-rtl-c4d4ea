// Address/control path.
//
// Passes the DFI command, bank, address, CKE and ODT of the memory controller
// to the SDRAM pins, or, while ctrl_sel is high, those of the calibration
// sequencer. The selected bundle is registered on the rising edge of dfi_clk0,
// so commands reach the pins one cycle after the DFI. Reset drives DESELECT
// with CKE low. The document shows the block and the control-signal select of
// the update handler; the register stage and the reset values are this
// design's.
`timescale 1ps/1ps
module addr_ctrl
  import ddr_phy_pkg::*;
(
  input  logic      dfi_clk0,
  input  logic      rst_n,
  input  logic      ctrl_sel,
  input  ddr_ctrl_t dfi_ctrl,
  input  ddr_ctrl_t cal_ctrl,
  output ddr_ctrl_t ddr_ctrl
);
  always_ff @(posedge dfi_clk0 or negedge rst_n)
    if (!rst_n) begin
      ddr_ctrl     <= '0;
      ddr_ctrl.cmd <= CMD_DESEL;
    end else
      ddr_ctrl <= ctrl_sel ? cal_ctrl : dfi_ctrl;
endmodule
