// Testbench of the read FIFO: words written on falling edges of a strobe-like
// write clock (bursts of four pulses at a clock unrelated to rclk) must come
// out in order on rclk with rddata_valid, none lost, none repeated; rinc low
// holds them; fifo_reset_n empties it.
`timescale 1ps/1ps
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rinc = 1, frst_n = 1, rst_n = 0, valid;
  logic [1:0] wdata = '0, rdata;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // reset edge for the asynchronous resets
  int checks = 0, failures = 0;
  logic [1:0] sent[$];
  int got;

  async_fifo #(.WIDTH(2), .AW(3)) dut (.wclk(wclk), .wdata(wdata), .rclk(rclk), .rinc(rinc),
    .rdata(rdata), .rddata_valid(valid), .fifo_reset_n(frst_n), .reset_n(rst_n));

  always #938 rclk = ~rclk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge rclk) if (valid) begin
    got++;
    check(sent.size() != 0 && rdata == sent[0], "word order");
    if (sent.size() != 0) void'(sent.pop_front());
  end

  task automatic wburst(int half_ps);
    repeat (4) begin
      wdata = 2'($urandom);
      wclk = 1; #(half_ps);
      sent.push_back(wdata);
      wclk = 0; #(half_ps);
    end
  endtask

  initial begin
    #2000000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #5000 rst_n = 1;
    #3001;
    for (int b = 0; b < 20; b++) begin
      wburst(900 + int'($urandom_range(0, 60)));
      #(int'($urandom_range(2000, 9000)));
    end
    #20000;
    check(got == 80, $sformatf("%0d of 80 words read", got));
    check(sent.size() == 0, "nothing left");
    rinc = 0;
    wburst(920);
    #20000;
    check(got == 80, "rinc low holds the words");
    rinc = 1;
    #10000;
    check(got == 84, "released by rinc");
    rinc = 0;
    wburst(920);
    #10000;
    frst_n = 0; #2000; frst_n = 1; sent.delete();
    rinc = 1;
    #10000;
    check(got == 84, "fifo_reset_n empties the FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
