// Dynamic strobe masking system (DSMS).
//
// Removes pre- and postamble glitches from the read strobe using only the
// DFI read-enable signal. Two counters run side by side: the expected-pulse
// counter adds one for every dfi_clk0 cycle in which (delayed) dfi_rddata_en
// is high, since each DFI cycle of read data is one DQS pulse; the
// received-pulse counter adds one on every falling edge of the masked strobe.
// The mask is high while the counts differ and is AND-ed with the incoming
// strobe. It therefore opens at the clock edge that first counts an expected
// pulse, and closes the moment the last expected falling edge has been
// received, so its length follows each burst instead of being fixed.
//
// Timing: the point at which the mask opens is set with mask_dly, a delay of
// 0..15 dfi_clk0 cycles on rddata_en. It must land inside the read preamble;
// with the mask opening in the second half of the preamble the expected count
// stays one ahead during the burst. The counter structure, the equality
// compare, the AND gate and counting the masked strobe follow the DQS slice
// diagram. The Gray coding of both counters (so the cross-domain compare
// sees one bit change at a time), the cycle-granular delay and the counter
// width are this design's choices.
`timescale 1ps/1ps
module dsms #(
  parameter int unsigned CNT_W = 4
) (
  input  logic       clk,          // dfi_clk0
  input  logic       rst_n,
  input  logic       rddata_en,    // dfi_rddata_en (one cycle per DQS pulse)
  input  logic [3:0] mask_dly,     // rddata_en to mask delay, in clk cycles
  input  logic       read_dqs,     // strobe from the DQS receiver
  output logic       mask,
  output logic       masked_dqs
);
  logic [15:0]      en_pipe;
  logic             en_dly;
  logic [CNT_W-1:0] exp_bin, exp_gray;
  logic [CNT_W-1:0] rcv_bin, rcv_gray;

  // Programmable delay of rddata_en: en_pipe[k] is rddata_en k+1 cycles late.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) en_pipe <= '0;
    else        en_pipe <= {en_pipe[14:0], rddata_en};

  always_comb en_dly = (mask_dly == 4'd0) ? rddata_en : en_pipe[mask_dly - 4'd1];

  // Expected pulses.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      exp_bin <= '0;
    else if (en_dly) exp_bin <= exp_bin + 1'b1;

  // Received pulses: falling edges of the masked strobe.
  always_ff @(negedge masked_dqs or negedge rst_n)
    if (!rst_n) rcv_bin <= '0;
    else        rcv_bin <= rcv_bin + 1'b1;

  always_comb begin
    exp_gray   = exp_bin ^ (exp_bin >> 1);
    rcv_gray   = rcv_bin ^ (rcv_bin >> 1);
    mask       = (exp_gray != rcv_gray);
    masked_dqs = read_dqs & mask;
  end
endmodule
