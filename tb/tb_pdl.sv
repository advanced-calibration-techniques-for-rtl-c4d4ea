// Testbench of the PDL model: the delay must be taps x tap_ps, the tap
// register must load only while select_pdl is high and clear on reset, and
// pulses shorter than the delay must pass unchanged.
`timescale 1ps/1ps
module tb_pdl;
  import ddr_phy_pkg::*;
  logic clk = 0, reset_n = 0, sel = 0, in = 0, out;
  tap_t taps = '0, taps_q;
  logic [15:0] tap_ps = 16'd45;
  initial begin reset_n = 1'b1; #1 reset_n = 1'b0; end  // reset edge for the asynchronous resets
  int checks = 0, failures = 0;
  longint t_in, t_out;

  pdl dut (.clk(clk), .reset_n(reset_n), .select_pdl(sel), .pdl_taps(taps),
           .tap_ps(tap_ps), .in(in), .out(out), .taps_q(taps_q));

  always #500 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(int exp_ps);
    fork
      begin #20 in = 1; t_in = $time; #300 in = 0; end
      begin @(posedge out); t_out = $time; end
    join
    check(t_out - t_in == exp_ps, $sformatf("delay %0d ps, expected %0d", t_out - t_in, exp_ps));
    @(negedge out);
    check($time - t_out == 300, "pulse width kept");
  endtask

  initial begin
    #50000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    reset_n = 1;
    check(taps_q == 0, "reset value");
    taps = 6'd10; @(negedge clk);
    check(taps_q == 0, "no load without select");
    sel = 1; @(posedge clk); @(negedge clk); sel = 0;
    check(taps_q == 10, "load with select");
    measure(450);
    taps = 6'd40; sel = 1; @(posedge clk); @(negedge clk); sel = 0; taps = 6'd3;
    measure(1800);
    tap_ps = 16'd50;
    measure(2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
