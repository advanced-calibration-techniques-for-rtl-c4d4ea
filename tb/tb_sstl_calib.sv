// Testbench of the SSTL impedance calibration engine, run against the dummy
// replica model. For several resistance scales the found codes must equal
// the ones worked out by scanning every code of the replica: the largest
// pull-up code not stronger than the external resistor, and the largest
// pull-down code still weaker than that pull-up. The codes reach the drivers
// only after wr, and the search takes 2 x 6 x SETTLE cycles plus overhead.
`timescale 1ps/1ps
module tb_sstl_calib;
  localparam int T = 1876;
  localparam int W = 6;
  logic clk = 0, rst_n = 0, act = 0, wr = 0;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // reset edge for the asynchronous resets
  logic cmp_p, cmp_n, busy, fsm_done, calib_done;
  logic [W-1:0] p_trial, n_trial, p_new, n_new, p_code, n_code;
  logic [7:0] pvt = 8'd100;
  int checks = 0, failures = 0;

  sstl_calib #(.CODE_W(W), .SETTLE(4)) dut (.clk(clk), .rst_n(rst_n), .act(act), .wr(wr),
    .cmp_p(cmp_p), .cmp_n(cmp_n), .p_trial(p_trial), .n_trial(n_trial), .p_code_new(p_new),
    .n_code_new(n_new), .p_code(p_code), .n_code(n_code), .busy(busy), .fsm_done(fsm_done),
    .calib_done(calib_done));
  sstl_dummy #(.CODE_W(W)) u_rep (.p_code(p_trial), .n_code(n_trial), .pvt_pct(pvt),
    .cmp_p(cmp_p), .cmp_n(cmp_n));

  always #(T/2) clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference: scan the replica resistances directly (6000 / 5400 ohm units, 150 ohm).
  function automatic int best_p(int pct);
    int best = 0;
    for (int c = 1; c < 2**W; c++) if (6000 * pct >= 150 * 100 * c) best = c;
    return best;
  endfunction
  function automatic int best_n(int pc);
    int best = 0;
    for (int c = 1; c < 2**W; c++) if (pc != 0 && 5400 * pc > 6000 * c) best = c;
    return best;
  endfunction

  initial begin
    #(T * 5000) failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    logic [W-1:0] p_before, n_before;
    #(T * 2) rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      int pcts[4] = '{100, 80, 125, 60};
      pvt = 8'(pcts[k]);
      p_before = p_code; n_before = n_code;
      @(negedge clk) act = 1; cyc = 0;
      while (!fsm_done) begin @(posedge clk); #1; cyc++; end
      @(negedge clk) act = 0;
      check(p_new == W'(best_p(pcts[k])), $sformatf("pvt %0d: p code %0d, expected %0d", pcts[k], p_new, best_p(pcts[k])));
      check(n_new == W'(best_n(best_p(pcts[k]))), $sformatf("pvt %0d: n code %0d, expected %0d", pcts[k], n_new, best_n(best_p(pcts[k]))));
      check(cyc <= 2 * W * 4 + 4, $sformatf("search took %0d cycles", cyc));
      check(p_code == p_before && n_code == n_before, "drivers unchanged before wr");
      @(negedge clk) wr = 1;
      while (!calib_done) begin @(posedge clk); #1; end
      @(negedge clk) wr = 0;
      check(p_code == p_new && n_code == n_new, "drivers updated by wr");
      check(!busy, "idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
