// Testbench of the deskew engine with its burst sequencer (cal_seq).
//
// A DFI-level model stands in for PHY and SDRAM: it stores written bursts and
// answers reads after a fixed latency. Each DQ line i has a skew s[i] (in
// taps); its data are correct when d = dq_taps[i] + s[i] - dqs_taps lies in
// [LO, HI], otherwise every beat of that line comes back inverted. Worked out
// independently of the engine: the first edge is dq = HI + init_dqs - s[i],
// the window is HI - LO taps, and the strobe goes to init_dqs + (HI-LO)/2.
// Checked: the final taps, lock, the time (the document quotes about 3 us,
// i.e. 1600 cycles at 533 MHz), that a recalibration restores the memory
// contents it overwrote, and that an impossible skew ends in lock_fail.
`timescale 1ps/1ps
module tb_deskew_engine;
  import ddr_phy_pkg::*;
  localparam int T  = 1876;
  localparam int LO = -8;
  localparam int HI = 6;
  logic clk = 0, rst_n = 0, clb = 0, reclb = 0;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // reset edge for the asynchronous resets
  logic seq_req, seq_ack, seq_rd_ok, taps_load, busy, done, locked, lock_fail;
  cal_burst_t seq_burst;
  logic [BL*DQ_W-1:0] seq_rdata;
  tap_t [DQ_W-1:0] dq_taps;
  tap_t dqs_taps, window;
  ddr_ctrl_t ctrl;
  logic wen, ren;
  logic [DFI_DW-1:0] wdata, rdata = '0;
  logic rvalid = 0;
  int checks = 0, failures = 0;
  int skew[DQ_W] = '{0, 1, 2, 3, 4, 5, 2, 1};
  logic [7:0] mem[BL];
  int wbeat, rd_pending, writes, reads;

  deskew_engine dut (.clk(clk), .rst_n(rst_n), .clb_req(clb), .reclb_req(reclb),
    .pattern(8'hFF), .init_dq_taps(6'd32), .init_dqs_taps(6'd16),
    .seq_req(seq_req), .seq_burst(seq_burst), .seq_ack(seq_ack), .seq_rdata(seq_rdata),
    .seq_rd_ok(seq_rd_ok), .dq_taps(dq_taps), .dqs_taps(dqs_taps), .taps_load(taps_load),
    .busy(busy), .done(done), .locked(locked), .lock_fail(lock_fail), .window_taps(window));

  cal_seq u_seq (.clk(clk), .rst_n(rst_n), .wr_lat(4'd3), .rd_lat(4'd4), .rd_timeout(8'd20),
    .req(seq_req), .burst(seq_burst), .ack(seq_ack), .rdata(seq_rdata), .rd_ok(seq_rd_ok),
    .ctrl(ctrl), .calib_wrdata_en(wen), .calib_wrdata(wdata), .calib_rddata_en(ren),
    .dfi_rddata(rdata), .dfi_rddata_valid(rvalid));

  always #(T/2) clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit line_ok(int i);
    int d = int'(dq_taps[i]) + skew[i] - int'(dqs_taps);
    return d >= LO && d <= HI;
  endfunction

  // DFI-level memory: writes on calib_wrdata_en, reads returned 3 cycles after
  // each calib_rddata_en cycle.
  logic [DFI_DW-1:0] rq[$];
  int rdelay[$];
  always @(posedge clk) begin
    if (ctrl.cmd == CMD_WR) begin wbeat = 0; writes++; end
    if (ctrl.cmd == CMD_RD) reads++;
    if (wen) begin
      for (int i = 0; i < DQ_W; i++) begin
        mem[wbeat][i]   = wdata[2*i];
        mem[wbeat+1][i] = wdata[2*i+1];
      end
      wbeat += 2;
    end
    rvalid <= 1'b0;
    if (ren) begin
      logic [DFI_DW-1:0] w;
      int c;
      c = rd_pending;
      rd_pending++;
      for (int i = 0; i < DQ_W; i++) begin
        w[2*i+1] = mem[2*c][i]   ^ !line_ok(i);
        w[2*i]   = mem[2*c+1][i] ^ !line_ok(i);
      end
      rq.push_back(w);
      rdelay.push_back(3);
      if (rd_pending == 4) rd_pending = 0;
    end
    foreach (rdelay[k]) rdelay[k]--;
    if (rdelay.size() != 0 && rdelay[0] == 0) begin
      rdata  <= rq.pop_front();
      rvalid <= 1'b1;
      void'(rdelay.pop_front());
    end
  end

  task automatic run(bit recal, output int cycles);
    cycles = 0;
    @(negedge clk); if (recal) reclb = 1; else clb = 1;
    while (!done) begin @(posedge clk); #1; cycles++; end
    @(negedge clk); clb = 0; reclb = 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    #(T * 20000) failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    logic [7:0] orig[BL];
    foreach (mem[b]) mem[b] = 8'($urandom);
    #(T * 2) rst_n = 1;
    repeat (2) @(posedge clk);
    // start-up calibration
    run(0, cyc);
    $display("INFO start-up calibration: %0d cycles, window %0d taps", cyc, window);
    check(locked && !lock_fail, "locked");
    for (int i = 0; i < DQ_W; i++)
      check(dq_taps[i] == tap_t'(HI + 16 - skew[i]), $sformatf("line %0d at %0d taps", i, dq_taps[i]));
    check(window == tap_t'(HI - LO), "window width");
    check(dqs_taps == tap_t'(16 + (HI - LO) / 2), $sformatf("DQS at %0d taps", dqs_taps));
    check(cyc < 1600, "calibration within 3 us at 533 MHz");
    check(writes == 1, "start-up: one pattern write, no save/restore");
    // recalibration must leave the first burst as it was
    foreach (mem[b]) begin mem[b] = 8'($urandom); orig[b] = mem[b]; end
    writes = 0;
    skew[2] = 4;
    run(1, cyc);
    check(locked, "recalibration locked");
    check(writes == 2, "pattern write and restore write");
    foreach (mem[b]) check(mem[b] == orig[b], $sformatf("beat %0d restored", b));
    check(dq_taps[2] == tap_t'(HI + 16 - 4), "line 2 follows its new skew");
    // a skew the PDL range cannot absorb
    skew[3] = 30;
    run(0, cyc);
    check(lock_fail && !locked, "lock_fail for an impossible skew");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
