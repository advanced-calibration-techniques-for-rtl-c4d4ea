// Calibration burst sequencer.
//
// Turns a one-burst request of the deskew engine into PHY-side traffic while
// the calibration engine owns the interface: a WR or RD command to bank 0,
// address 0 (the first 64 bits of the SDRAM), followed, after a programmable
// latency, by four cycles of calib_wrdata_en with the pattern or four cycles
// of calib_rddata_en, and, for a read, collects the four two-beat words from
// the DQ slices' FIFOs into one eight-beat result.
//
// Request/acknowledge: req is held high until ack, which is high for one
// cycle together with rdata and rd_ok. rd_ok is low if fewer than four words
// arrived within rd_timeout cycles (no strobe seen); the engine then treats
// every line as failing.
// Beat order: beat b of the burst sits in byte b of wdata/rdata. On the
// write side bit 2i of calib_wrdata is the first beat of line i in a cycle;
// on the read side bit 2i+1 of dfi_rddata is the first (rising-edge) beat.
// Everything in this module (latencies, addresses, the absence of ACT and PRE
// commands, which a real SDRAM would need around the burst) is this design's
// choice: the document only says that the engine writes and reads the
// pattern.
`timescale 1ps/1ps
module cal_seq
  import ddr_phy_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [3:0]           wr_lat,
  input  logic [3:0]           rd_lat,
  input  logic [7:0]           rd_timeout,
  input  logic                 req,
  input  cal_burst_t           burst,
  output logic                 ack,
  output logic [BL*DQ_W-1:0]   rdata,
  output logic                 rd_ok,
  output ddr_ctrl_t            ctrl,
  output logic                 calib_wrdata_en,
  output logic [DFI_DW-1:0]    calib_wrdata,
  output logic                 calib_rddata_en,
  input  logic [DFI_DW-1:0]    dfi_rddata,
  input  logic                 dfi_rddata_valid
);
  typedef enum logic [2:0] {S_IDLE, S_CMD, S_LAT, S_DATA, S_COLLECT, S_ACK} state_t;

  state_t            state;
  logic              we;
  logic [7:0]        cnt;
  logic [1:0]        beat_cyc;
  logic [2:0]        words;
  logic [BL*DQ_W-1:0] wbuf, rbuf;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= S_IDLE;
      we       <= 1'b0;
      cnt      <= '0;
      beat_cyc <= '0;
      words    <= '0;
      wbuf     <= '0;
      rbuf     <= '0;
      rd_ok    <= 1'b0;
    end else begin
      // Read words may arrive from the data phase onwards.
      if (dfi_rddata_valid && !we && words != 3'd4 &&
          (state == S_DATA || state == S_COLLECT || state == S_LAT)) begin
        for (int i = 0; i < DQ_W; i++) begin
          rbuf[(2*words)*DQ_W + i]   <= dfi_rddata[2*i+1];
          rbuf[(2*words+1)*DQ_W + i] <= dfi_rddata[2*i];
        end
        words <= words + 1'b1;
      end
      unique case (state)
        S_IDLE: if (req) begin
          we    <= burst.we;
          wbuf  <= burst.wdata;
          words <= '0;
          state <= S_CMD;
        end
        S_CMD: begin
          cnt   <= '0;
          state <= S_LAT;
        end
        S_LAT: begin
          cnt <= cnt + 1'b1;
          if (cnt + 8'd1 >= {4'd0, (we ? wr_lat : rd_lat)}) begin
            beat_cyc <= '0;
            state    <= S_DATA;
          end
        end
        S_DATA: begin
          beat_cyc <= beat_cyc + 1'b1;
          if (beat_cyc == 2'd3) begin
            cnt   <= '0;
            state <= we ? S_ACK : S_COLLECT;
          end
        end
        S_COLLECT: begin
          cnt <= cnt + 1'b1;
          if (words == 3'd4 || cnt >= rd_timeout) begin
            rd_ok <= (words == 3'd4);
            state <= S_ACK;
          end
        end
        S_ACK: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end

  always_comb begin
    ctrl      = '0;
    ctrl.cmd  = CMD_NOP;
    ctrl.cke  = 1'b1;
    if (state == S_CMD) ctrl.cmd = we ? CMD_WR : CMD_RD;

    calib_wrdata_en = (state == S_DATA) && we;
    calib_rddata_en = (state == S_DATA) && !we;
    calib_wrdata    = '0;
    for (int i = 0; i < DQ_W; i++) begin
      calib_wrdata[2*i]   = wbuf[(2*beat_cyc)*DQ_W + i];
      calib_wrdata[2*i+1] = wbuf[(2*beat_cyc+1)*DQ_W + i];
    end
    ack   = (state == S_ACK);
    rdata = rbuf;
  end
endmodule
