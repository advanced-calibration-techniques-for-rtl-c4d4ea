// DQ bit slice: one data line of the byte lane.
//
// Write path: sel_wd chooses, per bit, between the two-bit single-rate word
// from the memory controller (dfi_wrdata) and from the calibration engine
// (calib_wrdata). The word is latched on the falling edge of dfi_clk0 (Qa),
// then moved into a register clocked on the rising edge of dfi_clk90 (Qp,
// bit 1) and one clocked on the falling edge (Qn, bit 0). dfi_clk90 itself
// selects which of the two drives write_dq: Qp while it is low, Qn while it is
// high. Each bit is therefore on the line for exactly half a dfi_clk90 period,
// which sets the write data pulse width; bit 0 of a word leaves first, a
// quarter period after the next dfi_clk0 rising edge.
//
// Read path: read_dq goes through a 64-tap PDL that the deskew engine
// programs (pdl_taps, loaded while select_pdl is high). The delayed bit is
// captured on the rising edge (Q1) and falling edge (Q2) of masked_DQS90 and
// written as {Q1, Q2} into the read FIFO by masked_DQS90_d, so dfi_rddata[1]
// holds the earlier (rising-edge) bit and dfi_rddata[0] the later one; the
// FIFO hands the words to the dfi_clk0 domain.
//
// The structure, the clock of each register and the signal names follow the
// DQ slice diagram. Clocking Qp/Qn from dfi_clk90 is read from the text's
// "positive-edge and negative-edge register" and the serialiser select; the
// bit order on the read side follows the post-layout read example. Registers
// clear on reset_n.
`timescale 1ps/1ps
module dq_bitslice
  import ddr_phy_pkg::*;
#(
  parameter int unsigned FIFO_AW = 3
) (
  input  logic        dfi_clk0,
  input  logic        dfi_clk90,
  input  logic        reset_n,
  // write path
  input  logic        sel_wd,
  input  logic [1:0]  dfi_wrdata,
  input  logic [1:0]  calib_wrdata,
  output logic        write_dq,
  // read path
  input  logic        read_dq,
  input  logic        masked_dqs90,
  input  logic        masked_dqs90_d,
  input  tap_t        pdl_taps,
  input  logic        select_pdl,
  input  logic [15:0] tap_ps,
  input  logic        rinc,
  input  logic        fifo_reset_n,
  output logic [1:0]  dfi_rddata,
  output logic        dfi_rddata_valid,
  output tap_t        pdl_taps_q
);
  logic [1:0] wsel;
  logic       qa0, qa1, qp, qn;
  logic       dq_dly, q1, q2;

  // ---------------- write path ----------------
  assign wsel = sel_wd ? calib_wrdata : dfi_wrdata;

  always_ff @(negedge dfi_clk0 or negedge reset_n)
    if (!reset_n) {qa0, qa1} <= 2'b00;
    else          {qa0, qa1} <= wsel;

  always_ff @(posedge dfi_clk90 or negedge reset_n)
    if (!reset_n) qp <= 1'b0;
    else          qp <= qa0;

  always_ff @(negedge dfi_clk90 or negedge reset_n)
    if (!reset_n) qn <= 1'b0;
    else          qn <= qa1;

  assign write_dq = dfi_clk90 ? qn : qp;

  // ---------------- read path ----------------
  pdl u_pdl (
    .clk        (dfi_clk0),
    .reset_n    (reset_n),
    .select_pdl (select_pdl),
    .pdl_taps   (pdl_taps),
    .tap_ps     (tap_ps),
    .in         (read_dq),
    .out        (dq_dly),
    .taps_q     (pdl_taps_q)
  );

  always_ff @(posedge masked_dqs90 or negedge reset_n)
    if (!reset_n) q1 <= 1'b0;
    else          q1 <= dq_dly;

  always_ff @(negedge masked_dqs90 or negedge reset_n)
    if (!reset_n) q2 <= 1'b0;
    else          q2 <= dq_dly;

  async_fifo #(.WIDTH(2), .AW(FIFO_AW)) u_fifo (
    .wclk         (masked_dqs90_d),
    .wdata        ({q1, q2}),
    .rclk         (dfi_clk0),
    .rinc         (rinc),
    .rdata        (dfi_rddata),
    .rddata_valid (dfi_rddata_valid),
    .fifo_reset_n (fifo_reset_n),
    .reset_n      (reset_n)
  );
endmodule
