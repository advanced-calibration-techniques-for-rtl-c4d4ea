// DQS bit slice: strobe qualification, strobe phases and write strobe.
//
// Read: the strobe from the DQS receiver (read_dqs) is cleaned by the DSMS,
// giving masked_dqs. It then passes the deskew PDL, whose setting the deskew
// engine uses to move the capture point, and a first SDL of 90 degrees,
// giving masked_dqs90, which clocks the capture registers of the DQ slices. A
// second 90-degree SDL and a buffer give masked_dqs90_d, which clocks the DQ
// slices' read FIFOs; both SDLs take deg90_taps from the RCDLL.
// Write: the write-DQS generator makes the write strobe with its pre- and
// postamble and the driver/receiver enables.
//
// This arrangement (DSMS, then PDL, then two SDLs, with masked_DQS90 taken
// between them, and the write-enable select) is the one in the DQS slice
// diagram. The buffer is modelled as part of the second SDL.
`timescale 1ps/1ps
module dqs_bitslice
  import ddr_phy_pkg::*;
(
  input  logic        dfi_clk0,
  input  logic        reset_n,
  // read
  input  logic        read_dqs,
  input  logic        dfi_rddata_en,
  input  logic [3:0]  mask_dly,
  input  tap_t        pdl_taps,
  input  logic        select_pdl,
  input  tap_t        deg90_taps,
  input  logic [15:0] tap_ps,
  output logic        mask,
  output logic        masked_dqs,
  output logic        masked_dqs90,
  output logic        masked_dqs90_d,
  output tap_t        pdl_taps_q,
  // write
  input  logic        sel_wd,
  input  logic        dfi_wrdata_en,
  input  logic        calib_wrdata_en,
  output logic        write_dqs,
  output logic        tx_en,
  output logic        rx_en
);
  logic dqs_pdl;

  dsms u_dsms (
    .clk        (dfi_clk0),
    .rst_n      (reset_n),
    .rddata_en  (dfi_rddata_en),
    .mask_dly   (mask_dly),
    .read_dqs   (read_dqs),
    .mask       (mask),
    .masked_dqs (masked_dqs)
  );

  pdl u_pdl (
    .clk        (dfi_clk0),
    .reset_n    (reset_n),
    .select_pdl (select_pdl),
    .pdl_taps   (pdl_taps),
    .tap_ps     (tap_ps),
    .in         (masked_dqs),
    .out        (dqs_pdl),
    .taps_q     (pdl_taps_q)
  );

  sdl u_sdl0 (.deg90_taps(deg90_taps), .tap_ps(tap_ps), .in(dqs_pdl),      .out(masked_dqs90));
  sdl u_sdl1 (.deg90_taps(deg90_taps), .tap_ps(tap_ps), .in(masked_dqs90), .out(masked_dqs90_d));

  write_dqs_gen u_wgen (
    .clk0            (dfi_clk0),
    .rst_n           (reset_n),
    .sel_wd          (sel_wd),
    .dfi_wrdata_en   (dfi_wrdata_en),
    .calib_wrdata_en (calib_wrdata_en),
    .write_dqs       (write_dqs),
    .tx_en           (tx_en),
    .rx_en           (rx_en)
  );
endmodule
