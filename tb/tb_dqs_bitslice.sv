// Testbench of the DQS bit slice: a glitchy read strobe must come out on
// masked_dqs90 cleaned and delayed by (PDL taps + 90-degree taps) x tap_ps,
// and on masked_dqs90_d by another 90 degrees; a write burst must produce
// four write-strobe pulses under tx_en.
`timescale 1ps/1ps
module tb_dqs_bitslice;
  import ddr_phy_pkg::*;
  localparam int T = 1876;
  logic clk0 = 0, reset_n = 0, dqs = 0, en = 0, sel = 0, wen = 0, cwen = 0;
  logic mask, mdqs, m90, m90d, wdqs, tx_en, rx_en;
  tap_t taps = 6'd12, taps_q, deg90 = 6'd10;
  logic select_pdl = 0;
  logic [15:0] tap_ps = 16'd45;
  initial begin reset_n = 1'b1; #1 reset_n = 1'b0; end  // reset edge for the asynchronous resets
  int checks = 0, failures = 0;
  longint rin[$], r90[$], r90d[$];
  int wpulses;

  dqs_bitslice dut (.dfi_clk0(clk0), .reset_n(reset_n), .read_dqs(dqs), .dfi_rddata_en(en),
    .mask_dly(4'd1), .pdl_taps(taps), .select_pdl(select_pdl), .deg90_taps(deg90),
    .tap_ps(tap_ps), .mask(mask), .masked_dqs(mdqs), .masked_dqs90(m90),
    .masked_dqs90_d(m90d), .pdl_taps_q(taps_q), .sel_wd(sel), .dfi_wrdata_en(wen),
    .calib_wrdata_en(cwen), .write_dqs(wdqs), .tx_en(tx_en), .rx_en(rx_en));

  always #(T/2) clk0 = ~clk0;
  always @(posedge m90)  r90.push_back($time);
  always @(posedge m90d) r90d.push_back($time);
  always @(posedge wdqs) if (tx_en) wpulses++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(T * 200) failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint t_en;
    #(T * 2) reset_n = 1;
    @(negedge clk0); select_pdl = 1; @(negedge clk0); select_pdl = 0;
    check(taps_q == 12, "PDL loaded");
    @(posedge clk0); t_en = $time;
    fork
      begin #100 en = 1; repeat (4) @(posedge clk0); #100 en = 0; end
      begin
        // mask opens at t_en + 2T; preamble glitch before it, strobe from t_en + 2.7T
        #(T); dqs = 1; #100; dqs = 0;
        #(T - 100 + (7 * T) / 10);
        repeat (4) begin rin.push_back($time); dqs = 1; #(T/2); dqs = 0; #(T/2); end
        #300; dqs = 1; #80; dqs = 0;
      end
    join
    #(4 * T);
    check(r90.size() == 4, $sformatf("%0d pulses on masked_dqs90", r90.size()));
    check(r90d.size() == 4, "four pulses on masked_dqs90_d");
    for (int k = 0; k < 4 && k < r90.size() && k < r90d.size(); k++) begin
      check(r90[k] - rin[k] == (12 + 10) * 45, $sformatf("masked_dqs90 delay %0d", r90[k] - rin[k]));
      check(r90d[k] - r90[k] == 10 * 45, "masked_dqs90_d a further 90 degrees");
    end
    // write strobe
    sel = 1;
    @(posedge clk0); #100 cwen = 1; wen = 1;
    repeat (4) @(posedge clk0);
    #100 cwen = 0; wen = 0;
    #(4 * T);
    check(wpulses == 4, $sformatf("%0d write strobe pulses", wpulses));
    check(rx_en && !tx_en, "receiver enabled again after the write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
