// Behavioural model of one x8 DDR2 SDRAM as seen by the PHY, for system tests.
//
// Commands are sampled on the rising edge of ck. WRITE: the burst is captured
// on both edges of the incoming strobe while dqs_oe is high (the strobe is
// centred on the data), eight beats into the addressed column; writes issued
// BL/2 clocks apart are captured in order from one continuous strobe. READ: CL clocks
// after the command plus BOARD_PS (flight time, package, I/O), the strobe
// leaves high impedance (modelled as low) for a one-clock preamble, makes four
// pulses and returns, and DQ line i changes edge-aligned with the strobe plus
// skew_ps[i]; the first UNCERT_PS of each bit carries a random value, which
// stands for the data-valid uncertainty of a real device. A glitch is injected before the preamble and another in the
// postamble, as a DDR2 device produces them when it enters and leaves high
// impedance; reads issued BL/2 clocks apart run back to back, with one long
// strobe and no postamble between them. Rows and banks are not modelled: the
// array is indexed by column address. Counts of injected glitches are kept
// for the testbench.
`timescale 1ps/1ps
module ddr2_sdram_model
  import ddr_phy_pkg::*;
#(
  parameter int T_PS     = 1876,
  parameter int CL       = 5,
  parameter int BOARD_PS = 1313,
  parameter int UNCERT_PS = 300   // start of each read bit with the data not yet valid
) (
  input  logic            ck,
  input  ddr_ctrl_t       ctrl,
  input  logic [DQ_W-1:0] dq_in,     // from the PHY
  input  logic            dq_oe,
  input  logic            dqs_in,
  input  logic            dqs_oe,
  output logic [DQ_W-1:0] dq_out,    // towards the PHY
  output logic            dqs_out,
  input  int              skew_ps [DQ_W],
  input  bit              glitches
);
  logic [7:0] mem [int][BL];
  int         wr_cols [$];         // columns of issued writes, oldest first
  int         wr_beat;
  longint     last_rd_cmd;
  int         glitch_count, reads, writes, b2b_reads, b2b_writes;
  longint     last_wr_cmd;
  longint     burst_end;           // time the strobe of the latest read ends

  initial begin
    dq_out = '0; dqs_out = 1'b0; wr_beat = 0; last_rd_cmd = -1000000;
    glitch_count = 0; reads = 0; writes = 0; b2b_reads = 0; burst_end = 0;
    b2b_writes = 0; last_wr_cmd = -1000000;
  end

  function automatic logic [7:0] rd_beat(int col, int b);
    if (mem.exists(col)) return mem[col][b];
    return 8'h00;
  endfunction

  // Write capture on both strobe edges.
  always @(dqs_in) if (dqs_oe && wr_cols.size() != 0) begin
    if (!mem.exists(wr_cols[0])) for (int b = 0; b < BL; b++) mem[wr_cols[0]][b] = 8'h00;
    mem[wr_cols[0]][wr_beat] = dq_in;
    wr_beat++;
    if (wr_beat == BL) begin wr_beat = 0; void'(wr_cols.pop_front()); end
  end

  // Read jobs are queued at the command and played by one strobe process and
  // one process per DQ line, so bursts never share local state.
  typedef struct { longint t0; bit b2b_prev; logic [BL-1:0] bits; } line_job_t;
  typedef struct { longint t0; bit b2b_prev; } strobe_job_t;
  strobe_job_t sq [$];
  line_job_t   lq [DQ_W][$];

  initial forever begin
    strobe_job_t j;
    wait (sq.size() != 0);
    j = sq.pop_front();
    if (!j.b2b_prev && j.t0 - T_PS - 300 > $time) begin
      #(j.t0 - T_PS - 300 - $time);
      if (glitches) begin dqs_out = 1; #90; dqs_out = 0; glitch_count++; end
    end
    if (j.t0 > $time) #(j.t0 - $time);
    for (int p = 0; p < BURST_CYC; p++) begin
      dqs_out = 1; #(T_PS / 2); dqs_out = 0; #(T_PS / 2);
    end
    if (burst_end <= j.t0 + BURST_CYC * T_PS) begin
      #(250);
      if (glitches) begin dqs_out = 1; #70; dqs_out = 0; glitch_count++; end
    end
  end

  for (genvar gi = 0; gi < DQ_W; gi++) begin : g_line
    initial forever begin
      line_job_t j;
      wait (lq[gi].size() != 0);
      j = lq[gi].pop_front();
      if (j.t0 + skew_ps[gi] > $time) #(j.t0 + skew_ps[gi] - $time);
      for (int b = 0; b < BL; b++) begin
        dq_out[gi] = 1'($urandom);
        #(UNCERT_PS);
        dq_out[gi] = j.bits[b];
        #(T_PS / 2 - UNCERT_PS);
      end
      if (burst_end <= j.t0 + BURST_CYC * T_PS) dq_out[gi] = 1'b0;
    end
  end

  always @(posedge ck) begin
    if (ctrl.cmd == CMD_WR) begin
      wr_cols.push_back(int'(ctrl.addr)); writes++;
      if (longint'($time) - last_wr_cmd == longint'(BURST_CYC) * T_PS) b2b_writes++;
      last_wr_cmd = longint'($time);
    end
    if (ctrl.cmd == CMD_RD) begin
      automatic longint t0  = longint'($time) + longint'(CL) * T_PS + BOARD_PS;
      automatic bit     b2b = (longint'($time) - last_rd_cmd == longint'(BURST_CYC) * T_PS);
      automatic int     col = int'(ctrl.addr);
      reads++;
      if (b2b) b2b_reads++;
      last_rd_cmd = longint'($time);
      burst_end   = t0 + BURST_CYC * T_PS;
      sq.push_back('{t0: t0, b2b_prev: b2b});
      for (int i = 0; i < DQ_W; i++) begin
        line_job_t lj;
        lj.t0 = t0; lj.b2b_prev = b2b;
        for (int b = 0; b < BL; b++) lj.bits[b] = rd_beat(col, b)[i];
        lq[i].push_back(lj);
      end
    end
  end
endmodule
