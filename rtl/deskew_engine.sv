// DQ bit-deskew calibration engine.
//
// Aligns the eight DQ lines of a byte lane to each other and then centres the
// strobe in the common data-valid window, by programming the nine PDLs (one
// per DQ slice, one in the DQS slice). Sequence:
//   1. On reclb_req (recalibration during operation) first read the first
//      burst of the SDRAM and keep it; on clb_req (start-up) skip this.
//   2. Write the pattern burst: beats alternate `pattern` and ~pattern
//      (FFh/00h by default, which makes all lines switch together).
//   3. Set every DQ PDL to init_dq_taps (32) and the DQS PDL to init_dqs_taps
//      (16), so the strobe samples too early on every line.
//   4. Read the burst. A line is valid when all eight of its beats match. Every
//      invalid line is moved back one tap; repeat until all lines are valid in
//      the same burst. That setting is the first window edge, and the lines
//      are now aligned with each other.
//   5. Move all lines back one tap per read until any bit of any line fails;
//      the setting of the read before is the other edge.
//   6. Put the DQ PDLs back at the first edge and add half of the window width
//      (in taps) to the DQS PDL, which puts the strobe in the middle.
//   7. After a recalibration, write the saved burst back.
// A line that would have to go below tap 0 ends the run in lock_fail. done is
// high for one cycle at the end, with locked or lock_fail.
//
// The steps, their order and the tap numbers follow the description of the
// algorithm and its state diagram, where "DQ[7:0]=FFh" is read as "all eight
// line-valid flags set". How the window middle is turned into a DQS setting
// (DQ at the first edge, DQS moved by half the width) is this design's
// reading of "the DQS PDL is set ... so as to place the strobe in the middle".
// Memory traffic goes through the cal_seq request/acknowledge port.
`timescale 1ps/1ps
module deskew_engine
  import ddr_phy_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clb_req,
  input  logic               reclb_req,
  input  logic [7:0]         pattern,
  input  tap_t               init_dq_taps,
  input  tap_t               init_dqs_taps,
  // burst port towards cal_seq
  output logic               seq_req,
  output cal_burst_t         seq_burst,
  input  logic               seq_ack,
  input  logic [BL*DQ_W-1:0] seq_rdata,
  input  logic               seq_rd_ok,
  // PDL control
  output tap_t [DQ_W-1:0]    dq_taps,
  output tap_t               dqs_taps,
  output logic               taps_load,
  // status
  output logic               busy,
  output logic               done,
  output logic               locked,
  output logic               lock_fail,
  output tap_t               window_taps
);
  typedef enum logic [4:0] {
    S_IDLE, S_SAVE, S_WRITE_PAT, S_SHIFT, S_READ1, S_CMP1, S_STORE1,
    S_DEC2, S_READ2, S_CMP2, S_STORE2, S_CALC, S_PROG, S_RESTORE,
    S_LOCKED, S_FAIL
  } state_t;

  state_t              state;
  logic                recal;
  logic [BL*DQ_W-1:0]  saved, rd_q;
  logic                rd_ok_q;
  tap_t [DQ_W-1:0]     edge1, edge2;
  logic [BL*DQ_W-1:0]  expected;
  logic [DQ_W-1:0]     line_ok;
  logic [DQ_W-1:0]     at_zero;

  // Expected burst and per-line comparison of the last read.
  always_comb begin
    for (int b = 0; b < BL; b++)
      expected[b*DQ_W +: DQ_W] = b[0] ? ~pattern : pattern;
    for (int i = 0; i < DQ_W; i++) begin
      line_ok[i] = rd_ok_q;
      for (int b = 0; b < BL; b++)
        if (rd_q[b*DQ_W + i] != expected[b*DQ_W + i]) line_ok[i] = 1'b0;
      at_zero[i] = (dq_taps[i] == '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state       <= S_IDLE;
      recal       <= 1'b0;
      saved       <= '0;
      rd_q        <= '0;
      rd_ok_q     <= 1'b0;
      edge1       <= '0;
      edge2       <= '0;
      dq_taps     <= '0;
      dqs_taps    <= '0;
      taps_load   <= 1'b0;
      locked      <= 1'b0;
      lock_fail   <= 1'b0;
      window_taps <= '0;
    end else begin
      taps_load <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (reclb_req) begin
            recal <= 1'b1;
            state <= S_SAVE;
          end else if (clb_req) begin
            recal <= 1'b0;
            state <= S_WRITE_PAT;
          end
        end
        S_SAVE: if (seq_ack) begin
          saved <= seq_rdata;
          state <= S_WRITE_PAT;
        end
        S_WRITE_PAT: if (seq_ack) state <= S_SHIFT;
        S_SHIFT: begin
          locked    <= 1'b0;
          lock_fail <= 1'b0;
          for (int i = 0; i < DQ_W; i++) dq_taps[i] <= init_dq_taps;
          dqs_taps  <= init_dqs_taps;
          taps_load <= 1'b1;
          state     <= S_READ1;
        end
        S_READ1: if (seq_ack) begin
          rd_q    <= seq_rdata;
          rd_ok_q <= seq_rd_ok;
          state   <= S_CMP1;
        end
        S_CMP1: begin
          if (&line_ok) state <= S_STORE1;
          else if (|(~line_ok & at_zero)) state <= S_FAIL;
          else begin
            for (int i = 0; i < DQ_W; i++)
              if (!line_ok[i]) dq_taps[i] <= dq_taps[i] - 1'b1;
            taps_load <= 1'b1;
            state     <= S_READ1;
          end
        end
        S_STORE1: begin
          edge1 <= dq_taps;
          state <= S_DEC2;
        end
        S_DEC2: begin
          if (|at_zero) state <= S_FAIL;
          else begin
            for (int i = 0; i < DQ_W; i++) dq_taps[i] <= dq_taps[i] - 1'b1;
            taps_load <= 1'b1;
            state     <= S_READ2;
          end
        end
        S_READ2: if (seq_ack) begin
          rd_q    <= seq_rdata;
          rd_ok_q <= seq_rd_ok;
          state   <= S_CMP2;
        end
        S_CMP2: state <= (&line_ok) ? S_DEC2 : S_STORE2;
        S_STORE2: begin
          for (int i = 0; i < DQ_W; i++) edge2[i] <= dq_taps[i] + 1'b1;
          state <= S_CALC;
        end
        S_CALC: begin
          window_taps <= edge1[0] - edge2[0];
          dqs_taps    <= init_dqs_taps + ((edge1[0] - edge2[0]) >> 1);
          dq_taps     <= edge1;
          state       <= S_PROG;
        end
        S_PROG: begin
          taps_load <= 1'b1;
          state     <= recal ? S_RESTORE : S_LOCKED;
        end
        S_RESTORE: if (seq_ack) state <= S_LOCKED;
        S_LOCKED: begin
          locked <= 1'b1;
          state  <= S_IDLE;
        end
        S_FAIL: begin
          lock_fail <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end

  always_comb begin
    seq_req         = (state == S_SAVE) || (state == S_WRITE_PAT) || (state == S_READ1) ||
                      (state == S_READ2) || (state == S_RESTORE);
    seq_burst.we    = (state == S_WRITE_PAT) || (state == S_RESTORE);
    seq_burst.wdata = (state == S_RESTORE) ? saved : expected;
    busy            = (state != S_IDLE);
    done            = (state == S_LOCKED) || (state == S_FAIL);
  end
endmodule
