// Testbench of the write-DQS generator: for a burst of N DFI cycles the
// strobe must have N pulses; tx_en must rise half a clock before the first
// rising edge (preamble) and fall half a clock after the last falling edge
// (postamble); the first rising edge is 1.5 clocks after the rising edge that
// starts the write-enable cycle; sel_wd picks the enable source.
`timescale 1ps/1ps
module tb_write_dqs_gen;
  localparam int T = 1876;
  logic clk = 0, rst_n = 0, sel = 0, en_mc = 0, en_cal = 0;
  logic wdqs, tx_en, rx_en;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // reset edge for the asynchronous resets
  int checks = 0, failures = 0;
  int rises;
  longint t_tx_rise, t_tx_fall, t_first_rise, t_last_fall, t_start;

  write_dqs_gen dut (.clk0(clk), .rst_n(rst_n), .sel_wd(sel), .dfi_wrdata_en(en_mc),
                     .calib_wrdata_en(en_cal), .write_dqs(wdqs), .tx_en(tx_en), .rx_en(rx_en));

  always #(T/2) clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge wdqs) begin if (rises == 0) t_first_rise = $time; rises++; end
  always @(negedge wdqs) t_last_fall = $time;
  always @(posedge tx_en) t_tx_rise = $time;
  always @(negedge tx_en) t_tx_fall = $time;
  always @(posedge clk) check(rx_en == !tx_en, "rx_en is the complement of tx_en");

  task automatic burst(int n, bit use_cal, bit drive_other);
    rises = 0;
    @(posedge clk); t_start = $time; #100;
    if (use_cal) en_cal = 1; else en_mc = 1;
    if (drive_other) begin if (use_cal) en_mc = 1; else en_cal = 1; end
    repeat (n) @(posedge clk);
    #100 en_mc = 0; en_cal = 0;
    #(4 * T);
  endtask

  initial begin
    #(T * 300) failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #(T * 2) rst_n = 1;
    #(T * 2);
    for (int n = 1; n <= 4; n++) begin
      burst(n, 0, 0);
      check(rises == n, $sformatf("burst %0d: %0d strobe pulses", n, rises));
      check(t_first_rise - t_tx_rise == T / 2, $sformatf("preamble %0d", t_first_rise - t_tx_rise));
      check(t_tx_fall - t_last_fall == T / 2, $sformatf("postamble %0d", t_tx_fall - t_last_fall));
      check(t_first_rise - t_start == (3 * T) / 2, "first rising edge 1.5 clocks after enable");
    end
    sel = 1;
    burst(4, 1, 0);
    check(rises == 4, "calibration enable drives the strobe");
    burst(2, 0, 0);
    check(rises == 0, "controller enable ignored while sel_wd = 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
