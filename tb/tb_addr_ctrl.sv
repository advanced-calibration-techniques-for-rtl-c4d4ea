// Testbench of the address/control path: after reset DESELECT with CKE low;
// then, one clock after the DFI, the controller's bundle, or the calibration
// bundle while ctrl_sel is high.
`timescale 1ps/1ps
module tb_addr_ctrl;
  import ddr_phy_pkg::*;
  logic clk = 0, rst_n = 0, sel = 0;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // reset edge for the asynchronous resets
  ddr_ctrl_t mc = '0, cal = '0, pins, mc_q, cal_q;
  logic sel_q;
  int checks = 0, failures = 0;

  addr_ctrl dut (.dfi_clk0(clk), .rst_n(rst_n), .ctrl_sel(sel), .dfi_ctrl(mc), .cal_ctrl(cal),
                 .ddr_ctrl(pins));

  always #938 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #3000;
    check(pins.cmd == CMD_DESEL && !pins.cke, "reset state");
    rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      mc  = ddr_ctrl_t'($urandom);
      cal = ddr_ctrl_t'($urandom);
      sel = 1'($urandom);
      mc_q = mc; cal_q = cal; sel_q = sel;
      @(posedge clk); #1;
      check(pins == (sel_q ? cal_q : mc_q), $sformatf("cycle %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
