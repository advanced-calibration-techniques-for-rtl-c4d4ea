// Testbench of the update handler. Simple responders answer each request
// (DLL lock, SSTL search and write, SDRAM init, training, period measurement)
// after a few cycles. Checked: the start-up order; path selects and upd_busy;
// the controller-update handshake; that Refresh starts a period measurement;
// that SSTL search and SSTL write fall into two different refresh intervals
// once sstl_period has elapsed; that a period change of more than delta_n
// taps (and not of exactly delta_n) raises dfi_phyupd_req and, after the
// acknowledge, a retraining.
`timescale 1ps/1ps
module tb_update_handler;
  import ddr_phy_pkg::*;
  localparam int T = 1876;
  logic clk = 0, rst_n = 0;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // reset edge for the asynchronous resets
  logic dll_done = 0, tdc_meas, tdc_meas_done = 0;
  logic [7:0] period_taps = 8'd41;
  logic act, fsm_done = 0, fsm_busy = 0, zq_wr, zq_done = 0;
  logic sdram_init, sdram_init_done = 0, rd_train, rd_retrain, train_done = 0;
  ddr_cmd_t cmd = CMD_NOP;
  logic ctrlupd_req = 0, ctrlupd_ack, phyupd_req, phyupd_ack = 0, init_complete;
  logic ctrl_sel, wr_sel, upd_busy;
  logic [7:0] ref_taps;
  int checks = 0, failures = 0;
  string events[$];
  int n_act, n_wr, n_meas, n_retrain;

  update_handler dut (.clk(clk), .rst_n(rst_n), .delta_n(4'd4), .sstl_period(16'd60),
    .dll_done(dll_done), .tdc_meas(tdc_meas), .tdc_meas_done(tdc_meas_done),
    .period_taps(period_taps), .sstl_calib_act(act), .sstl_fsm_done(fsm_done),
    .sstl_fsm_busy(fsm_busy), .sstl_calib_wr(zq_wr), .sstl_calib_done(zq_done),
    .sdram_init(sdram_init), .sdram_init_done(sdram_init_done), .rd_train(rd_train),
    .rd_retrain(rd_retrain), .rd_train_done(train_done), .dfi_cmd(cmd),
    .dfi_ctrlupd_req(ctrlupd_req), .dfi_ctrlupd_ack(ctrlupd_ack), .dfi_phyupd_req(phyupd_req),
    .dfi_phyupd_ack(phyupd_ack), .dfi_init_complete(init_complete), .ctrl_sel(ctrl_sel),
    .wr_sel(wr_sel), .upd_busy(upd_busy), .ref_taps(ref_taps));

  always #(T/2) clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Responders: request level in, done pulse after a few cycles.
  task automatic respond(ref logic req, ref logic done_sig, input int lat, input string name);
    forever begin
      @(posedge clk); #1;
      if (req) begin
        events.push_back(name);
        repeat (lat) @(posedge clk);
        #1 done_sig = 1; @(posedge clk); #1 done_sig = 0;
      end
    end
  endtask

  initial respond(act, fsm_done, 5, "sstl_search");
  initial respond(zq_wr, zq_done, 2, "sstl_write");
  initial respond(sdram_init, sdram_init_done, 3, "sdram_init");
  initial respond(rd_train, train_done, 10, "train");
  initial respond(rd_retrain, train_done, 10, "retrain");
  initial respond(tdc_meas, tdc_meas_done, 3, "measure");
  always @(posedge clk) if (fsm_done) fsm_busy <= 0; else if (act) fsm_busy <= 1;
  always @(posedge clk) if (rd_train || rd_retrain) check(ctrl_sel && wr_sel, "calibration owns the paths while training");
  always @(posedge clk) if (phyupd_req && !rd_retrain) phyupd_ack <= 1; else phyupd_ack <= 0;

  task automatic refresh();
    @(negedge clk); cmd = CMD_REF; @(negedge clk); cmd = CMD_NOP;
    repeat (30) @(posedge clk);
  endtask

  function automatic int count(string name);
    int n = 0;
    foreach (events[k]) if (events[k] == name) n++;
    return n;
  endfunction

  initial begin
    #(T * 3000) failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #(T * 2) rst_n = 1;
    repeat (5) @(posedge clk);
    check(upd_busy && !init_complete, "busy before start-up");
    dll_done = 1;
    wait (init_complete);
    @(posedge clk); #1;
    check(events.size() == 4 && events[0] == "sstl_search" && events[1] == "sstl_write" &&
          events[2] == "sdram_init" && events[3] == "train", "start-up order");
    check(!upd_busy && !ctrl_sel && !wr_sel, "controller owns the interface when ready");
    check(ref_taps == 41, "reference period");
    // controller update handshake
    @(negedge clk) ctrlupd_req = 1;
    repeat (2) @(posedge clk); #1;
    check(ctrlupd_ack, "dfi_ctrlupd_ack");
    @(negedge clk) ctrlupd_req = 0;
    repeat (2) @(posedge clk); #1;
    check(!ctrlupd_ack && !upd_busy, "back to ready");
    // refresh before sstl_period: measurement only
    events.delete();
    refresh();
    check(events.size() == 1 && events[0] == "measure", "refresh: measurement only");
    check(!phyupd_req, "no update for an unchanged period");
    // after sstl_period: search in one interval, write in the next
    repeat (70) @(posedge clk);
    events.delete();
    refresh();
    check(count("sstl_search") == 1 && count("sstl_write") == 0, "first interval: search");
    refresh();
    check(count("sstl_search") == 1 && count("sstl_write") == 1, "second interval: write");
    refresh();
    check(count("sstl_search") == 1 && count("sstl_write") == 1, "then wait for the period again");
    check(count("measure") == 3, "measurement in every interval");
    // period change of exactly delta_n: no recalibration
    period_taps = 8'd45;
    events.delete();
    refresh();
    check(count("retrain") == 0, "change of delta_n taps: no recalibration");
    // change of more than delta_n
    period_taps = 8'd46;
    events.delete();
    fork
      refresh();
      begin wait (phyupd_req); check(upd_busy, "busy while updating"); end
    join
    repeat (20) @(posedge clk);
    check(count("retrain") == 1, "change above delta_n: retraining");
    check(ref_taps == 46, "new reference period");
    check(!phyupd_req && !upd_busy, "update finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
