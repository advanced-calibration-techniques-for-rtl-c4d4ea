// Testbench of the SDL model: a strobe pulse train is delayed by
// deg90_taps x tap_ps, each pulse keeping its width.
`timescale 1ps/1ps
module tb_sdl;
  import ddr_phy_pkg::*;
  logic in = 0, out;
  tap_t deg90 = 6'd10;
  logic [15:0] tap_ps = 16'd47;
  int checks = 0, failures = 0;
  longint rise_in[$], rise_out[$];

  sdl dut (.deg90_taps(deg90), .tap_ps(tap_ps), .in(in), .out(out));

  always @(posedge in)  rise_in.push_back($time);
  always @(posedge out) rise_out.push_back($time);

  initial begin
    #50000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #100;
    repeat (4) begin in = 1; #300; in = 0; #300; end   // pulses shorter than the delay
    #2000;
    deg90 = 6'd20;
    repeat (2) begin in = 1; #400; in = 0; #400; end
    #3000;
    checks++;
    if (rise_out.size() != 6) begin failures++; $display("FAIL: %0d output edges", rise_out.size()); end
    for (int k = 0; k < rise_out.size() && k < 6; k++) begin
      checks++;
      if (rise_out[k] - rise_in[k] != (k < 4 ? 470 : 940)) begin
        failures++; $display("FAIL: edge %0d delay %0d", k, rise_out[k] - rise_in[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
