// Behavioural model: slave delay line (SDL).
//
// Delays `in` by deg90_taps cells of tap_ps each. The tap count comes from
// the RCDLL period measurement divided by four, so the delay is a quarter of
// the DFI clock period: the SDLs of the DQS slice turn the strobe into the
// 90-degree shifted capture strobe. The line is analog in silicon; this is a
// transport-delay model with the same ports.
`timescale 1ps/1ps
module sdl
  import ddr_phy_pkg::*;
(
  input  tap_t        deg90_taps,
  input  logic [15:0] tap_ps,
  input  logic        in,
  output logic        out
);
  int unsigned delay_ps;
  always_comb delay_ps = int'(deg90_taps) * int'(tap_ps);
  transport_delay u_line (.in(in), .delay_ps(delay_ps), .out(out));
endmodule
