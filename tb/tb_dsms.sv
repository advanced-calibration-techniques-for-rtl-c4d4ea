// Testbench of the DSMS.
//
// Read strobes are generated as a DDR2 device sends them: a one-clock
// preamble, one pulse per DFI cycle of rddata_en, a postamble, with a glitch
// both before the preamble and in the postamble. Checks: exactly the real
// pulses reach masked_dqs, each intact (same rise time and width); the mask
// rises inside the preamble (mask_dly cycles after rddata_en) and falls right
// after the last real falling edge; bursts of 4 and 8 pulses give masks of
// different lengths (the dynamic behaviour); back-to-back reads work.
`timescale 1ps/1ps
module tb_dsms;
  localparam int T = 1876;
  logic clk = 0, rst_n = 0, en = 0, dqs = 0;
  logic [3:0] mask_dly = 4'd2;
  logic mask, mdqs;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // reset edge for the asynchronous resets
  int checks = 0, failures = 0;
  int pulses_out;
  longint mask_rise, mask_fall, last_real_fall, first_real_rise;
  longint mask_len[$];

  dsms dut (.clk(clk), .rst_n(rst_n), .rddata_en(en), .mask_dly(mask_dly),
            .read_dqs(dqs), .mask(mask), .masked_dqs(mdqs));

  always #(T/2) clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge mdqs) pulses_out++;
  always @(posedge mask) mask_rise = $time;
  always @(negedge mask) mask_fall = $time;

  // Strobe of one burst: first rising edge at t_first (absolute time).
  task automatic strobe(longint t_first, int npulses);
    #(t_first - T - 300 - $time);
    dqs = 1; #80; dqs = 0;                      // glitch before the preamble
    #(t_first - $time);
    first_real_rise = $time;
    repeat (npulses) begin dqs = 1; #(T/2); dqs = 0; #(T/2); end
    last_real_fall = $time - T/2;
    #(T/2 - 200);
    #150; dqs = 1; #60; dqs = 0;                // postamble glitch
  endtask

  task automatic burst(int ncyc);
    longint t_en;
    pulses_out = 0;
    @(posedge clk); #100 en = 1; t_en = $time - 100;
    fork
      begin repeat (ncyc) @(posedge clk); #100 en = 0; end
      // mask opens at t_en + (mask_dly+1)*T: put the first rising edge 0.7 T later
      strobe(t_en + longint'(mask_dly + 1) * T + (7 * T) / 10, ncyc);
    join
    #(2 * T);
    check(pulses_out == ncyc, $sformatf("%0d pulses passed, expected %0d", pulses_out, ncyc));
    check(mask_rise == t_en + longint'(mask_dly + 1) * T, "mask opens mask_dly cycles after rddata_en");
    check(first_real_rise - mask_rise > T / 2 && first_real_rise - mask_rise < T,
          "mask opens inside the preamble");
    check(mask_fall >= last_real_fall && mask_fall - last_real_fall < 50,
          $sformatf("mask closes %0d ps after the last falling edge", mask_fall - last_real_fall));
    mask_len.push_back(mask_fall - mask_rise);
  endtask

  initial begin
    #(T * 400) failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #(T * 2) rst_n = 1;
    #(T * 3);
    burst(4);
    burst(8);
    mask_dly = 4'd5;
    burst(4);
    check(mask_len[1] - mask_len[0] == 4 * T, "mask length follows the burst length");
    check(!mask, "mask closed when idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
