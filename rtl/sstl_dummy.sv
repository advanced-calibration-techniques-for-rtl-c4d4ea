// Behavioural model: dummy SSTL replica with its external resistor and the
// two calibration comparators.
//
// The replica has a pull-up and a pull-down made of parallel legs; with
// `code` legs on, a half has R_UNIT / code ohms (no legs: open), scaled by
// pvt_pct / 100 to mimic process, voltage and temperature drift.
//   cmp_p: the replica pull-up (p_code) drives the external resistor R_EXT to
//          ground; high when the pad is above VDDQ/2, i.e. R_p < R_EXT.
//   cmp_n: a second replica pull-up at the same p_code drives the pull-down
//          (n_code); high when the node is above VDDQ/2, i.e. R_n > R_p.
// The comparators are ideal and settle at once. The replica and the 150 ohm
// resistor are shown in the block diagram; the leg model, the unit
// resistances and the pvt_pct input are this model's own.
`timescale 1ps/1ps
module sstl_dummy #(
  parameter int unsigned CODE_W   = 6,
  parameter int unsigned R_EXT    = 150,
  parameter int unsigned R_UNIT_P = 6000,
  parameter int unsigned R_UNIT_N = 5400
) (
  input  logic [CODE_W-1:0] p_code,
  input  logic [CODE_W-1:0] n_code,
  input  logic [7:0]        pvt_pct,
  output logic              cmp_p,
  output logic              cmp_n
);
  longint unsigned gp, gn;   // leg conductances, in units of 1 / (R_UNIT * pvt)

  always_comb begin
    gp = longint'(p_code);
    gn = longint'(n_code);
    // R_p < R_EXT  <=>  R_UNIT_P * pvt / (100 * code) < R_EXT
    cmp_p = (gp != 0) && (longint'(R_UNIT_P) * longint'(pvt_pct) < longint'(R_EXT) * 100 * gp);
    // R_n > R_p    <=>  R_UNIT_N / n_code > R_UNIT_P / p_code
    if (gn == 0)      cmp_n = (gp != 0);
    else if (gp == 0) cmp_n = 1'b0;
    else              cmp_n = longint'(R_UNIT_N) * gp > longint'(R_UNIT_P) * gn;
  end
endmodule
