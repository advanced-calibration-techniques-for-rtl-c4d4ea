// End-to-end test of the DDR2 PHY byte lane at its default parameters.
//
// The PHY runs at 533 MHz (DDR2-1066) against a DDR2 device model with
// CL = 5, a board delay, per-line DQ skews of up to 150 ps and strobe glitches
// before every preamble and in every postamble. The testbench plays the
// memory controller on the DFI. Sequence and checks:
//   1. Start-up: DLL lock, SSTL search and write, SDRAM init (answered here),
//      deskew training. The lane must lock with the lines deskewed: tap
//      setting x tap delay + skew equal on all lines to within one tap.
//   2. Controller traffic: random write bursts, read back and compared,
//      including back-to-back reads (one long strobe, one long mask) and
//      32-word transfers made of four BL8 writes and four BL8 reads issued
//      BL/2 cycles apart.
//   3. dfi_ctrlupd handshake.
//   4. Refresh intervals: a drift of the driver resistance must reach the
//      driver codes after a search in one interval and a write in the next.
//   5. A tap-delay drift above delta_n: the refresh-time period measurement
//      must raise dfi_phyupd_req; after the acknowledge the lane is retrained
//      (with the first burst saved and restored) and traffic is correct
//      again at the new delay.
// Each mechanism is counted, and one that never happened is a failure.
`timescale 1ps/1ps
module tb_ddr2_phy_top;
  import ddr_phy_pkg::*;
  localparam int T = 1876;
  localparam int WR_LAT = 3;
  localparam int RD_LAT = 4;

  logic dfi_clk = 0, rst_n = 0;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // reset edge for the asynchronous resets
  ddr_ctrl_t dfi_ctrl;
  logic dfi_wrdata_en = 0, dfi_rddata_en = 0, dfi_rddata_valid;
  logic [DFI_DW-1:0] dfi_wrdata = '0, dfi_rddata;
  logic ctrlupd_req = 0, ctrlupd_ack, phyupd_req, phyupd_ack = 0, init_complete;
  logic cfg_we = 0;
  logic [3:0] cfg_addr = '0;
  logic [15:0] cfg_wdata = '0, cfg_rdata;
  logic sdram_init, sdram_init_done = 0;
  ddr_ctrl_t ddr_ctrl;
  logic [DQ_W-1:0] dq_out, dq_in;
  logic dq_oe, dqs_out, dqs_oe, dqs_ie, dqs_in;
  logic [ZQ_W-1:0] p_code, n_code;
  logic upd_busy, locked, lock_fail, mask;
  logic [7:0] period_taps, ref_taps;
  tap_t dqs_taps, window;
  tap_t [DQ_W-1:0] dq_taps;
  logic [15:0] tap_ps = 16'd45;
  logic [7:0] pvt = 8'd100;
  int skew[DQ_W] = '{0, 60, 120, 30, 150, 90, 15, 105};

  int checks = 0, failures = 0;
  int n_reads_ok = 0, n_b2b = 0, n_ctrlupd = 0, n_phyupd = 0, n_zq_update = 0;
  int n_refresh = 0, n_mask = 0, n_retrain_ok = 0, n_train = 0;

  ddr2_phy_top dut (
    .dfi_clk(dfi_clk), .rst_n(rst_n), .dfi_ctrl(dfi_ctrl), .dfi_wrdata_en(dfi_wrdata_en),
    .dfi_wrdata(dfi_wrdata), .dfi_rddata_en(dfi_rddata_en), .dfi_rddata(dfi_rddata),
    .dfi_rddata_valid(dfi_rddata_valid), .dfi_ctrlupd_req(ctrlupd_req),
    .dfi_ctrlupd_ack(ctrlupd_ack), .dfi_phyupd_req(phyupd_req), .dfi_phyupd_ack(phyupd_ack),
    .dfi_init_complete(init_complete), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
    .cfg_wdata(cfg_wdata), .cfg_rdata(cfg_rdata), .sdram_init(sdram_init),
    .sdram_init_done(sdram_init_done), .ddr_ctrl(ddr_ctrl), .dq_out(dq_out), .dq_oe(dq_oe),
    .dq_in(dq_in), .dqs_out(dqs_out), .dqs_oe(dqs_oe), .dqs_ie(dqs_ie), .dqs_in(dqs_in),
    .drv_p_code(p_code), .drv_n_code(n_code), .upd_busy(upd_busy), .deskew_locked(locked),
    .deskew_fail(lock_fail), .period_taps(period_taps), .dqs_taps_q(dqs_taps),
    .dq_taps_q(dq_taps), .deskew_window(window), .dsms_mask(mask), .ref_taps(ref_taps),
    .tap_ps(tap_ps), .pvt_pct(pvt));

  ddr2_sdram_model #(.T_PS(T), .CL(5), .BOARD_PS(1313)) u_mem (
    .ck(dfi_clk), .ctrl(ddr_ctrl), .dq_in(dq_out), .dq_oe(dq_oe), .dqs_in(dqs_out),
    .dqs_oe(dqs_oe), .dq_out(dq_in), .dqs_out(dqs_in), .skew_ps(skew), .glitches(1'b1));

  always #(T/2) dfi_clk = ~dfi_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- controller model ----------------
  logic [7:0] shadow [int][BL];
  logic [7:0] exp_q [$];
  logic [DFI_DW-1:0] words [$];
  int cyc = 0;                       // dfi_clk cycle count, for the schedules

  initial dfi_ctrl = '{cmd: CMD_NOP, ba: '0, addr: '0, cke: 1'b1, odt: 1'b0};

  always @(posedge mask) n_mask++;
  always @(posedge phyupd_req) n_phyupd++;
  always @(posedge ctrlupd_ack) n_ctrlupd++;
  always @(p_code or n_code) if (init_complete) n_zq_update++;

  // Read data under dfi_rddata_valid while the controller owns the lane.
  always @(posedge dfi_clk) if (dfi_rddata_valid && !upd_busy) words.push_back(dfi_rddata);

  // The controller drives the DFI shortly after the rising edge of dfi_clk.
  task automatic tick();
    @(posedge dfi_clk);
    #100;
  endtask

  // Loop counters of concurrent task calls are kept in automatic variables.
  task automatic ticks(int n);
    for (int k = 0; k < n; k++) tick();
  endtask

  task automatic cfg_write(int a, int v);
    tick(); cfg_addr = 4'(a); cfg_wdata = 16'(v); cfg_we = 1;
    tick(); cfg_we = 0;
  endtask

  task automatic issue(ddr_cmd_t c, int col);
    tick(); dfi_ctrl.cmd = c; dfi_ctrl.addr = ADDR_W'(col);
    tick(); dfi_ctrl.cmd = CMD_NOP;
  endtask

  // WR in cycle c, data in cycles c+1+WR_LAT .. c+4+WR_LAT, played by one
  // clocked process from a queue, so writes may follow each other BL/2
  // cycles apart.
  typedef struct { int start; logic [7:0] d [BL]; } wr_job_t;
  wr_job_t wr_jobs [$];
  always @(posedge dfi_clk) begin
    #100;
    while (wr_jobs.size() != 0 && cyc >= wr_jobs[0].start + BURST_CYC) void'(wr_jobs.pop_front());
    dfi_wrdata_en = 0;
    if (wr_jobs.size() != 0 && cyc >= wr_jobs[0].start) begin
      int k;
      k = cyc - wr_jobs[0].start;
      dfi_wrdata_en = 1;
      for (int i = 0; i < DQ_W; i++) begin
        dfi_wrdata[2*i]   = wr_jobs[0].d[2*k][i];
        dfi_wrdata[2*i+1] = wr_jobs[0].d[2*k+1][i];
      end
    end
  end

  task automatic mc_write(int col, logic [7:0] d [BL]);
    wr_job_t j;
    tick();
    dfi_ctrl.cmd = CMD_WR; dfi_ctrl.addr = ADDR_W'(col);
    j.start = cyc + 1 + WR_LAT;
    j.d = d;
    wr_jobs.push_back(j);
    for (int b = 0; b < BL; b++) shadow[col][b] = d[b];
    tick();
    dfi_ctrl.cmd = CMD_NOP;
  endtask

  // RD in cycle c, rddata_en in cycles c+1+RD_LAT .. c+4+RD_LAT. The enable
  // is played by one clocked process from a list of start cycles, so reads
  // issued BL/2 cycles apart overlap without sharing task state.
  int rd_start [$];
  always @(posedge dfi_clk) begin
    cyc++;
    #100;
    while (rd_start.size() != 0 && cyc >= rd_start[0] + BURST_CYC) void'(rd_start.pop_front());
    dfi_rddata_en = 0;
    foreach (rd_start[k]) if (cyc >= rd_start[k] && cyc < rd_start[k] + BURST_CYC) dfi_rddata_en = 1;
  end

  task automatic mc_read(int col);
    for (int b = 0; b < BL; b++) exp_q.push_back(shadow.exists(col) ? shadow[col][b] : 8'h00);
    tick();
    dfi_ctrl.cmd = CMD_RD; dfi_ctrl.addr = ADDR_W'(col);
    rd_start.push_back(cyc + 1 + RD_LAT);
    tick();
    dfi_ctrl.cmd = CMD_NOP;
  endtask

  // Compare all outstanding read data.
  task automatic drain_and_compare(string what);
    int bursts;
    bursts = exp_q.size() / BL;
    repeat (25) @(posedge dfi_clk);
    check(words.size() == bursts * BURST_CYC,
          $sformatf("%s: %0d read words, expected %0d", what, words.size(), bursts * BURST_CYC));
    for (int r = 0; r < bursts; r++) begin
      bit ok;
      ok = 1;
      for (int k = 0; k < BURST_CYC; k++) begin
        logic [DFI_DW-1:0] w;
        logic [7:0] e0, e1;
        w  = (words.size() != 0) ? words.pop_front() : '0;
        e0 = exp_q.pop_front();
        e1 = exp_q.pop_front();
        for (int i = 0; i < DQ_W; i++)
          if (w[2*i+1] != e0[i] || w[2*i] != e1[i]) ok = 0;
      end
      check(ok, $sformatf("%s: read burst %0d data", what, r));
      if (ok) n_reads_ok++;
    end
    exp_q.delete();
    words.delete();
  endtask

  task automatic traffic(int n, string what);
    logic [7:0] d [BL];
    int cols[$];
    for (int k = 0; k < n; k++) begin
      int col;
      col = 8 * (1 + int'($urandom_range(0, 30)));
      foreach (d[b]) d[b] = 8'($urandom);
      mc_write(col, d);
      ticks(8);
      cols.push_back(col);
    end
    ticks(4);
    foreach (cols[k]) begin mc_read(cols[k]); ticks(7); end
    drain_and_compare(what);
    // 32-word write and read: four BL8 bursts each, BL/2 cycles apart
    for (int k = 0; k < 4; k++) begin
      foreach (d[b]) d[b] = 8'($urandom);
      mc_write(256 + 8 * k, d);
      ticks(BURST_CYC - 2);
    end
    ticks(10);
    for (int k = 0; k < 4; k++) begin mc_read(256 + 8 * k); ticks(BURST_CYC - 2); end
    ticks(10);
    drain_and_compare({what, " 32-word"});
    // back-to-back reads, BL/2 cycles apart
    mc_read(cols[0]);
    ticks(BURST_CYC - 2);
    mc_read(cols[1]);
    ticks(10);
    drain_and_compare({what, " back-to-back"});
  endtask

  task automatic refresh();
    issue(CMD_REF, 0);
    n_refresh++;
    ticks(60);
  endtask

  function automatic bit deskewed();
    int lo, hi;
    lo = 1 << 30;
    hi = -(1 << 30);
    for (int i = 0; i < DQ_W; i++) begin
      int a;
      a = int'(dq_taps[i]) * int'(tap_ps) + skew[i];
      if (a < lo) lo = a;
      if (a > hi) hi = a;
    end
    return (hi - lo) <= int'(tap_ps);
  endfunction

  initial begin
    #(T * 60000) failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // SDRAM power-up sequence: answered after a few cycles.
  always @(posedge dfi_clk) if (sdram_init && !sdram_init_done) begin
    repeat (10) @(posedge dfi_clk);
    sdram_init_done <= 1;
    @(posedge dfi_clk) sdram_init_done <= 0;
  end

  initial begin
    logic [7:0] d0 [BL];
    int b2b_before;
    #(T * 3) rst_n = 1;
    cfg_write(2, 1);        // mask_dly: open the DSMS mask in the read preamble
    cfg_write(1, 300);      // sstl_period
    // 1. start-up
    wait (init_complete);
    n_train++;
    $display("INFO start-up done at %0t: period %0d taps, DQS %0d taps, window %0d taps",
             $time, period_taps, dqs_taps, window);
    check(locked && !lock_fail, "deskew locked at start-up");
    check(deskewed(), "lines deskewed at start-up");
    check(p_code == 6'd40 && n_code == 6'd35, $sformatf("SSTL codes %0d/%0d", p_code, n_code));
    // 2. traffic
    b2b_before = u_mem.b2b_reads;
    traffic(6, "start-up");
    n_b2b += u_mem.b2b_reads - b2b_before;
    // 3. controller update
    tick(); ctrlupd_req = 1;
    wait (ctrlupd_ack);
    tick(); ctrlupd_req = 0;
    ticks(4);
    check(!ctrlupd_ack, "ctrlupd handshake completes");
    // 4. impedance drift, followed over refresh intervals
    pvt = 8'd80;
    ticks(300);
    refresh();
    check(p_code == 6'd40, "codes not changed in the search interval");
    refresh();
    check(p_code == 6'd32, $sformatf("new pull-up code %0d after the write interval", p_code));
    check(!phyupd_req, "no PHY update without delay drift");
    // 5. delay drift and retraining; first burst must survive
    foreach (d0[b]) d0[b] = 8'($urandom);
    mc_write(0, d0);
    ticks(6);
    tap_ps = 16'd52;
    fork
      issue(CMD_REF, 0);
      begin
        wait (phyupd_req);
        ticks(3);
        phyupd_ack = 1; tick(); phyupd_ack = 0;
        wait (!phyupd_req);
      end
    join
    n_refresh++;
    ticks(10);
    $display("INFO retrained at %0t: period %0d taps, DQS %0d taps, window %0d taps",
             $time, period_taps, dqs_taps, window);
    check(locked && !lock_fail, "locked after retraining");
    check(deskewed(), "lines deskewed at the new tap delay");
    check(ref_taps == period_taps, "new reference period");
    if (locked) n_retrain_ok++;
    mc_read(0);
    ticks(10);
    drain_and_compare("first burst after recalibration");
    b2b_before = u_mem.b2b_reads;
    traffic(4, "after drift");
    n_b2b += u_mem.b2b_reads - b2b_before;

    $display("INFO back-to-back writes=%0d", u_mem.b2b_writes);
    $display("INFO mechanisms: train=%0d glitches=%0d masks=%0d reads_ok=%0d b2b=%0d ctrlupd=%0d refresh=%0d zq_updates=%0d phyupd=%0d retrain=%0d",
             n_train, u_mem.glitch_count, n_mask, n_reads_ok, n_b2b, n_ctrlupd, n_refresh,
             n_zq_update, n_phyupd, n_retrain_ok);
    check(u_mem.glitch_count > 0, "strobe glitches injected and masked");
    check(n_mask > 0, "DSMS mask");
    check(n_b2b > 0, "back-to-back reads");
    check(u_mem.b2b_writes > 0, "back-to-back writes");
    check(n_ctrlupd > 0, "controller update");
    check(n_zq_update > 0, "SSTL update over two refresh intervals");
    check(n_phyupd > 0, "PHY update request");
    check(n_retrain_ok > 0, "recalibration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
