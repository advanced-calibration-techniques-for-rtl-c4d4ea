// Testbench of the configuration register: reset defaults, write and read
// back of every field, no change without cfg_we, unmapped addresses ignored.
`timescale 1ps/1ps
module tb_cfg_regs;
  import ddr_phy_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // reset edge for the asynchronous resets
  logic [3:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  phy_cfg_t cfg;
  int checks = 0, failures = 0;
  int unsigned defaults[9] = '{4, 4096, 0, 3, 4, 32, 'hFF, 32, 16};
  int unsigned widths[9]   = '{4, 16, 4, 4, 4, 8, 8, 6, 6};
  int unsigned shadow[9];

  cfg_regs dut (.clk(clk), .rst_n(rst_n), .cfg_we(we), .cfg_addr(addr), .cfg_wdata(wdata),
                .cfg_rdata(rdata), .cfg(cfg));

  always #500 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #2000 rst_n = 1;
    for (int a = 0; a < 9; a++) begin
      addr = 4'(a); #1;
      check(rdata == 16'(defaults[a]), $sformatf("default of field %0d: %0d", a, rdata));
    end
    check(cfg.delta_n == 4 && cfg.init_dq_taps == 32 && cfg.init_dqs_taps == 16 && cfg.pattern == 8'hFF,
          "struct defaults");
    for (int r = 0; r < 3; r++)
      for (int a = 0; a < 9; a++) begin
        @(negedge clk);
        addr = 4'(a); wdata = 16'($urandom); we = 1;
        shadow[a] = int'(wdata) & ((1 << widths[a]) - 1);
        @(negedge clk); we = 0;
        check(rdata == 16'(shadow[a]), $sformatf("field %0d read back", a));
      end
    @(negedge clk); addr = 4'd1; wdata = 16'h1234; #1;
    @(negedge clk);
    check(rdata == 16'(shadow[1]), "no write without cfg_we");
    @(negedge clk); addr = 4'd12; we = 1; @(negedge clk); we = 0;
    check(rdata == 0, "unmapped address reads 0");
    check(cfg.sstl_period == 16'(shadow[1]) && cfg.mask_dly == 4'(shadow[2]), "struct follows writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
