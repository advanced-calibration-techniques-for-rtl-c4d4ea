// Testbench of the RCDLL model: lock after reset with the period in taps,
// dfi_clk90 a quarter period behind dfi_clk, and a new measurement on request
// reflecting a changed tap delay.
`timescale 1ps/1ps
module tb_rcdll;
  import ddr_phy_pkg::*;
  localparam int T = 1876;
  logic clk = 0, rst_n = 0, meas = 0;
  logic [15:0] tap_ps = 16'd45;
  logic clk0, clk90, dll_done, meas_done;
  logic [7:0] period_taps;
  tap_t deg90;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // reset edge for the asynchronous resets
  int checks = 0, failures = 0;
  longint t0;
  int done_cycles;

  rcdll dut (.dfi_clk(clk), .rst_n(rst_n), .tap_ps(tap_ps), .tdc_meas(meas),
             .dfi_clk0(clk0), .dfi_clk90(clk90), .dll_done(dll_done),
             .tdc_meas_done(meas_done), .period_taps(period_taps), .deg90_taps(deg90));

  always #(T/2) clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(T*200) failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #(T*2) rst_n = 1;
    wait (dll_done);
    check(period_taps == T / 45, $sformatf("period %0d taps", period_taps));
    check(deg90 == (T / 45) / 4, "deg90 taps");
    @(posedge clk); t0 = $time;
    @(posedge clk90);
    check($time - t0 == T / 4, $sformatf("clk90 offset %0d", $time - t0));
    tap_ps = 16'd52;
    @(negedge clk0); meas = 1;
    done_cycles = 0;
    while (!meas_done) begin @(posedge clk0); #1; done_cycles++; end
    @(negedge clk0); meas = 0;
    check(period_taps == T / 52, $sformatf("new period %0d taps", period_taps));
    check(deg90 == (T / 52) / 4, "new deg90");
    check(done_cycles <= 8, "measurement time");
    repeat (10) @(posedge clk0);
    check(!meas_done, "no measurement without request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
