// Write-DQS generator.
//
// Produces the write strobe, its output enable (tx_en) and the DQS receiver
// enable (rx_en) for a write burst. The write-enable source is chosen by
// sel_wd: dfi_wrdata_en from the memory controller (0) or calib_wrdata_en
// from the calibration engine (1), the same select the DQ slices use for
// their data.
//
// Timing, with the DQ slice write path: write-enable for DFI cycle k is
// sampled on the falling edge of dfi_clk0 in cycle k, like the data. From the
// next rising edge (k+1) the strobe is driven low (preamble, half a clock)
// and then follows the inverted dfi_clk0, rising at k+1.5 and falling at k+2,
// so its edges sit in the centre of the two bits the DQ slice sends for cycle
// k (those change on dfi_clk90 edges). After the last burst cycle the strobe
// stays driven low for another half clock (postamble). The strobe enable
// changes only while the inverted clock is low, so the gated strobe has no
// glitch, and tx_en is the OR of two overlapping register outputs.
// The select, the mux and the pins follow the DQS slice diagram; the half-clock
// pre- and postamble match the PHY timing table; the state machine itself is
// this design's.
`timescale 1ps/1ps
module write_dqs_gen (
  input  logic clk0,             // dfi_clk0
  input  logic rst_n,
  input  logic sel_wd,
  input  logic dfi_wrdata_en,
  input  logic calib_wrdata_en,
  output logic write_dqs,
  output logic tx_en,
  output logic rx_en
);
  logic en_n;       // write enable sampled on the falling edge
  logic toggle_q;   // strobe toggles during this clk0 cycle (burst)
  logic post_q;     // toggle_q delayed by half a clock: preamble..postamble

  // The two state bits {toggle_q, post_q} walk IDLE (00) -> BURST (11, with
  // 10 for the first half clock) -> POSTAMBLE (01, half a clock) -> IDLE.
  always_ff @(negedge clk0 or negedge rst_n)
    if (!rst_n) begin
      en_n   <= 1'b0;
      post_q <= 1'b0;
    end else begin
      en_n   <= sel_wd ? calib_wrdata_en : dfi_wrdata_en;
      post_q <= toggle_q;
    end

  always_ff @(posedge clk0 or negedge rst_n)
    if (!rst_n) toggle_q <= 1'b0;
    else        toggle_q <= en_n;

  always_comb begin
    write_dqs = toggle_q & ~clk0;
    tx_en     = toggle_q | post_q;
    rx_en     = ~tx_en;
  end
endmodule
