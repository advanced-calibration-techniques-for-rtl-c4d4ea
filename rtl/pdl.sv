// Behavioural model: 64-tap programmable delay line (PDL) with its tap register.
//
// The delay line itself is analog (a chain of delay cells); this model delays
// `in` by an intrinsic insertion delay plus tap count times tap_ps, with
// transport semantics. tap_ps stands for the process/voltage/temperature
// dependent delay of one cell and is driven by the test environment.
// The tap register is the digital part: it is cleared by reset_n and loads
// pdl_taps on a rising clk edge while select_pdl is high, so a calibration
// engine can reprogram the line between bursts. The tap register and the
// select/reset pins follow the DQ and DQS slice diagrams; the load-on-select
// behaviour and the insertion delay are this model's choices.
`timescale 1ps/1ps
module pdl
  import ddr_phy_pkg::*;
#(
  parameter int unsigned INTRINSIC_PS = 0
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        select_pdl,
  input  tap_t        pdl_taps,
  input  logic [15:0] tap_ps,
  input  logic        in,
  output logic        out,
  output tap_t        taps_q
);
  int unsigned delay_ps;

  always_ff @(posedge clk or negedge reset_n)
    if (!reset_n)        taps_q <= '0;
    else if (select_pdl) taps_q <= pdl_taps;

  always_comb delay_ps = INTRINSIC_PS + int'(taps_q) * int'(tap_ps);

  transport_delay u_line (.in(in), .delay_ps(delay_ps), .out(out));
endmodule
