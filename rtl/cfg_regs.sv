// Configuration register of the PHY.
//
// Holds the programmable settings of the calibration logic and presents them
// as one phy_cfg_t struct. A simple synchronous write port (cfg_we, cfg_addr,
// cfg_wdata) updates one field per write; cfg_rdata reads the addressed field
// back combinationally. Reset loads the defaults:
//   0 delta_n       4     allowed period change in taps (the document's n = 4)
//   1 sstl_period   4096  cycles between SSTL updates (document: programmable)
//   2 mask_dly      0     DSMS mask delay, cycles
//   3 wr_lat        3     calibration write latency, cycles
//   4 rd_lat        4     calibration read-enable latency, cycles
//   5 rd_timeout    32    calibration read time-out, cycles
//   6 pattern       FFh   deskew pattern (beats alternate FFh / 00h)
//   7 init_dq_taps  32    DQ PDL start of the deskew search
//   8 init_dqs_taps 16    DQS PDL start of the deskew search
// The document names the register only; the map, the port and the defaults
// not quoted from it above are this design's.
`timescale 1ps/1ps
module cfg_regs
  import ddr_phy_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [3:0]  cfg_addr,
  input  logic [15:0] cfg_wdata,
  output logic [15:0] cfg_rdata,
  output phy_cfg_t    cfg
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cfg.delta_n       <= 4'd4;
      cfg.sstl_period   <= 16'd4096;
      cfg.mask_dly      <= 4'd0;
      cfg.wr_lat        <= 4'd3;
      cfg.rd_lat        <= 4'd4;
      cfg.rd_timeout    <= 8'd32;
      cfg.pattern       <= 8'hFF;
      cfg.init_dq_taps  <= tap_t'(32);
      cfg.init_dqs_taps <= tap_t'(16);
    end else if (cfg_we) begin
      unique case (cfg_addr)
        4'd0: cfg.delta_n       <= cfg_wdata[3:0];
        4'd1: cfg.sstl_period   <= cfg_wdata;
        4'd2: cfg.mask_dly      <= cfg_wdata[3:0];
        4'd3: cfg.wr_lat        <= cfg_wdata[3:0];
        4'd4: cfg.rd_lat        <= cfg_wdata[3:0];
        4'd5: cfg.rd_timeout    <= cfg_wdata[7:0];
        4'd6: cfg.pattern       <= cfg_wdata[7:0];
        4'd7: cfg.init_dq_taps  <= cfg_wdata[TAP_W-1:0];
        4'd8: cfg.init_dqs_taps <= cfg_wdata[TAP_W-1:0];
        default: ;
      endcase
    end

  always_comb
    unique case (cfg_addr)
      4'd0:    cfg_rdata = {12'd0, cfg.delta_n};
      4'd1:    cfg_rdata = cfg.sstl_period;
      4'd2:    cfg_rdata = {12'd0, cfg.mask_dly};
      4'd3:    cfg_rdata = {12'd0, cfg.wr_lat};
      4'd4:    cfg_rdata = {12'd0, cfg.rd_lat};
      4'd5:    cfg_rdata = {8'd0, cfg.rd_timeout};
      4'd6:    cfg_rdata = {8'd0, cfg.pattern};
      4'd7:    cfg_rdata = {10'd0, cfg.init_dq_taps};
      4'd8:    cfg_rdata = {10'd0, cfg.init_dqs_taps};
      default: cfg_rdata = '0;
    endcase
endmodule
