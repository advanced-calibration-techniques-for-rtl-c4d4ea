// Testbench of the DQ bit slice.
// Write path: two-bit words on dfi_wrdata (or calib_wrdata with sel_wd = 1)
// must appear on write_dq bit 0 then bit 1, centred 1.5 and 2 clocks after
// the rising edge that starts their DFI cycle, each bit lasting half a clock.
// Read path: data centre-aligned to a masked_DQS90 burst (shifted early by the
// PDL setting) must come out of the FIFO as {rising sample, falling sample}
// words with dfi_rddata_valid, in order. A fixed burst checks the worked
// example of the read path: line sequence 1,0,0,1,0,0,1,0 gives 10,01,00,10.
`timescale 1ps/1ps
module tb_dq_bitslice;
  import ddr_phy_pkg::*;
  localparam int T = 1876;
  logic clk0 = 0, clk90 = 0, reset_n = 0, sel_wd = 0;
  logic [1:0] wr_mc = '0, wr_cal = '0, rd;
  logic wdq, rdq = 0, dqs90 = 0, dqs90_d = 0, select_pdl = 0, valid;
  tap_t taps = '0, taps_q;
  logic [15:0] tap_ps = 16'd45;
  initial begin reset_n = 1'b1; #1 reset_n = 1'b0; end  // reset edge for the asynchronous resets
  int checks = 0, failures = 0;
  logic [1:0] exp_q[$];
  int words;

  dq_bitslice dut (.dfi_clk0(clk0), .dfi_clk90(clk90), .reset_n(reset_n), .sel_wd(sel_wd),
    .dfi_wrdata(wr_mc), .calib_wrdata(wr_cal), .write_dq(wdq), .read_dq(rdq),
    .masked_dqs90(dqs90), .masked_dqs90_d(dqs90_d), .pdl_taps(taps), .select_pdl(select_pdl),
    .tap_ps(tap_ps), .rinc(1'b1), .fifo_reset_n(1'b1), .dfi_rddata(rd),
    .dfi_rddata_valid(valid), .pdl_taps_q(taps_q));

  always #(T/2) clk0 = ~clk0;
  initial begin #(T/4); forever #(T/2) clk90 = ~clk90; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit exp_fixed = 0;
  int fixed_words = 0;
  logic [1:0] fixed_seq [4] = '{2'b10, 2'b01, 2'b00, 2'b10};
  always @(posedge clk0) if (valid) begin
    if (exp_fixed && fixed_words < 4 && rd == fixed_seq[fixed_words]) fixed_words++;
    words++;
    check(exp_q.size() != 0 && rd == exp_q[0], $sformatf("read word %b", rd));
    if (exp_q.size() != 0) void'(exp_q.pop_front());
  end

  // Send n words, checking the line at the centre of every bit.
  task automatic write_words(int n, bit cal);
    logic [1:0] w[$];
    longint t0;
    @(posedge clk0); t0 = $time;
    fork
      for (int k = 0; k < n; k++) begin
        logic [1:0] v = 2'($urandom);
        w.push_back(v);
        #100; if (cal) begin wr_cal = v; wr_mc = ~v; end else begin wr_mc = v; wr_cal = ~v; end
        @(posedge clk0);
      end
      for (int k = 0; k < n; k++) begin
        #(t0 + longint'(k) * T + (3 * T) / 2 - $time);
        check(wdq == w[k][0], $sformatf("word %0d bit 0", k));
        #(T / 4 - 10); check(wdq == w[k][0], "bit 0 held to its end");
        #(T / 4 + 20); check(wdq == w[k][1], $sformatf("word %0d bit 1", k));
      end
    join
  endtask

  // Read burst: 8 bits centre-aligned to 4 strobe pulses, sent `early` ps early.
  task automatic read_burst(int early, int fixed = -1);
    logic [7:0] bits;
    longint t0;
    bits = (fixed < 0) ? 8'($urandom) : 8'(fixed);
    @(posedge clk0); t0 = $time + 3000;
    fork
      for (int b = 0; b < 8; b++) begin
        #(t0 + longint'(b) * (T / 2) - T / 4 - early - $time);
        rdq = bits[b];
      end
      for (int p = 0; p < 4; p++) begin
        #(t0 + longint'(p) * T - $time);
        dqs90 = 1; #(T / 2); dqs90 = 0;
        exp_q.push_back({bits[2*p], bits[2*p+1]});
      end
      begin #(t0 + T / 4 - $time); repeat (4) begin dqs90_d = 1; #(T / 2); dqs90_d = 0; #(T / 2); end end
    join
    #(6 * T);
  endtask

  initial begin
    #(T * 400) failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #(T * 2) reset_n = 1;
    write_words(6, 0);
    sel_wd = 1;
    write_words(4, 1);
    sel_wd = 0;
    read_burst(0);
    read_burst(0);
    taps = 6'd10; select_pdl = 1; @(posedge clk0); #1 select_pdl = 0;
    check(taps_q == 10, "PDL setting loaded");
    read_burst(450);
    // Worked example: line sequence 1,0,0,1,0,0,1,0 (first bit first) must
    // be read as the words 10, 01, 00, 10.
    exp_fixed = 1;
    read_burst(450, 8'b0100_1001);
    check(fixed_words == 4, "fixed sequence read as 10, 01, 00, 10");
    check(words == 16, $sformatf("%0d words read", words));
    check(exp_q.size() == 0, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
