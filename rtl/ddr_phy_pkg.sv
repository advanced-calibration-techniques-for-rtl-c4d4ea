// Shared types and constants of the DDR2 PHY byte lane.
//
// The lane has eight DQ lines and one DQS strobe. Every programmable delay
// line (PDL) and slave delay line (SDL) has 64 taps, set by a 6-bit code. A
// read or write burst is eight beats (BL8), which is four cycles of the
// single-rate DFI clock; each DFI cycle carries two bits per DQ line.
// DDR2 commands are encoded on cs_n/ras_n/cas_n/we_n as in JEDEC.
`timescale 1ps/1ps
package ddr_phy_pkg;

  localparam int unsigned DQ_W      = 8;    // data lines per strobe group
  localparam int unsigned TAP_W     = 6;    // PDL/SDL tap code width (64 taps)
  localparam int unsigned PDL_TAPS  = 64;
  localparam int unsigned BL        = 8;    // beats per burst
  localparam int unsigned BURST_CYC = BL / 2;  // DFI cycles per burst
  localparam int unsigned DFI_DW    = 2 * DQ_W; // dfi_wrdata / dfi_rddata width
  localparam int unsigned ADDR_W    = 14;
  localparam int unsigned BANK_W    = 3;
  localparam int unsigned ZQ_W      = 6;    // SSTL leg code width

  typedef logic [TAP_W-1:0] tap_t;

  // DDR2 command on the control pins, active-low.
  typedef struct packed {
    logic cs_n;
    logic ras_n;
    logic cas_n;
    logic we_n;
  } ddr_cmd_t;

  localparam ddr_cmd_t CMD_DESEL = '{cs_n: 1'b1, ras_n: 1'b1, cas_n: 1'b1, we_n: 1'b1};
  localparam ddr_cmd_t CMD_NOP   = '{cs_n: 1'b0, ras_n: 1'b1, cas_n: 1'b1, we_n: 1'b1};
  localparam ddr_cmd_t CMD_ACT   = '{cs_n: 1'b0, ras_n: 1'b0, cas_n: 1'b1, we_n: 1'b1};
  localparam ddr_cmd_t CMD_RD    = '{cs_n: 1'b0, ras_n: 1'b1, cas_n: 1'b0, we_n: 1'b1};
  localparam ddr_cmd_t CMD_WR    = '{cs_n: 1'b0, ras_n: 1'b1, cas_n: 1'b0, we_n: 1'b0};
  localparam ddr_cmd_t CMD_PRE   = '{cs_n: 1'b0, ras_n: 1'b0, cas_n: 1'b1, we_n: 1'b0};
  localparam ddr_cmd_t CMD_REF   = '{cs_n: 1'b0, ras_n: 1'b0, cas_n: 1'b0, we_n: 1'b1};

  // Address and control bundle driven towards the SDRAM.
  typedef struct packed {
    ddr_cmd_t            cmd;
    logic [BANK_W-1:0]   ba;
    logic [ADDR_W-1:0]   addr;
    logic                cke;
    logic                odt;
  } ddr_ctrl_t;

  // Programmable settings held by the configuration register.
  typedef struct packed {
    logic [3:0]  delta_n;       // allowed period change in taps before recalibration
    logic [15:0] sstl_period;   // DFI cycles between SSTL impedance updates
    logic [3:0]  mask_dly;      // DFI cycles from rddata_en to DSMS mask assertion
    logic [3:0]  wr_lat;        // calibration: cycles from WR command to wrdata_en
    logic [3:0]  rd_lat;        // calibration: cycles from RD command to rddata_en
    logic [7:0]  rd_timeout;    // calibration: cycles to wait for read data
    logic [7:0]  pattern;       // deskew pattern word; beats alternate pattern, ~pattern
    tap_t        init_dq_taps;  // DQ PDL start setting of the deskew search
    tap_t        init_dqs_taps; // DQS PDL start setting of the deskew search
  } phy_cfg_t;

  // Burst request from the deskew engine to its command sequencer.
  typedef struct packed {
    logic                 we;
    logic [BL*DQ_W-1:0]   wdata;   // beat b on bits [b*8 +: 8]
  } cal_burst_t;

endpackage
