// Testbench of the dummy SSTL replica model: comparator outputs against the
// resistances computed from the leg model for every code pair.
`timescale 1ps/1ps
module tb_sstl_dummy;
  logic [5:0] p = '0, n = '0;
  logic [7:0] pvt = 8'd100;
  logic cmp_p, cmp_n;
  int checks = 0, failures = 0;

  sstl_dummy #(.CODE_W(6)) dut (.p_code(p), .n_code(n), .pvt_pct(pvt), .cmp_p(cmp_p), .cmp_n(cmp_n));

  initial begin
    real rp, rn;
    for (int pct = 70; pct <= 130; pct += 30)
      for (int pc = 1; pc < 64; pc += 3)
        for (int nc = 1; nc < 64; nc += 5) begin
          pvt = 8'(pct); p = 6'(pc); n = 6'(nc);
          #10;
          rp = 6000.0 * pct / 100.0 / pc;
          rn = 5400.0 / nc;
          checks++;
          if (cmp_p != (rp < 150.0 - 1e-9)) begin failures++; $display("FAIL: cmp_p p=%0d pvt=%0d", pc, pct); end
          if (pct == 100) begin
            checks++;
            if (cmp_n != (rn > rp + 1e-9)) begin failures++; $display("FAIL: cmp_n p=%0d n=%0d", pc, nc); end
          end
        end
    p = 0; #10;
    checks++; if (cmp_p) begin failures++; $display("FAIL: no legs, no pull-up"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
