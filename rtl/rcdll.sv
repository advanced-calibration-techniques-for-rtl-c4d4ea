// Behavioural model: register-controlled delay-locked loop (RCDLL).
//
// From the external clock dfi_clk it produces dfi_clk0 (0 degrees, with the
// skew to dfi_clk removed) and dfi_clk90 (delayed by a quarter period), and
// it measures the clock period in delay-line taps. The measurement runs once
// after reset, after which dll_done rises, and again whenever tdc_meas is
// raised; tdc_meas_done is high for one dfi_clk0 cycle when the new count is
// on period_taps. deg90_taps (period / 4) programs the slave delay lines.
//
// The loop is analog/mixed-signal in silicon. Here the zero-skew dfi_clk0 is
// dfi_clk itself, the period is taken from the time between two rising edges
// and divided by tap_ps (the delay of one tap, set by the test environment to
// mimic PVT drift), and MEAS_CYCLES stands for the time a measurement takes.
// The outputs listed above follow the text; the cycle counts are assumptions.
`timescale 1ps/1ps
module rcdll
  import ddr_phy_pkg::*;
#(
  parameter int unsigned LOCK_CYCLES = 8,
  parameter int unsigned MEAS_CYCLES = 4
) (
  input  logic        dfi_clk,
  input  logic        rst_n,
  input  logic [15:0] tap_ps,
  input  logic        tdc_meas,
  output logic        dfi_clk0,
  output logic        dfi_clk90,
  output logic        dll_done,
  output logic        tdc_meas_done,
  output logic [7:0]  period_taps,
  output tap_t        deg90_taps
);
  longint      last_rise;
  longint      period_ps;
  int unsigned quarter_ps;
  int unsigned cnt;
  logic        busy;

  initial begin
    last_rise  = 0;
    period_ps  = 0;
    quarter_ps = 0;
  end

  assign dfi_clk0 = dfi_clk;

  always @(posedge dfi_clk) begin
    if (last_rise != 0) period_ps = longint'($time) - last_rise;
    last_rise  = longint'($time);
    quarter_ps = int'(period_ps / 4);
  end

  transport_delay u_q (.in(dfi_clk), .delay_ps(quarter_ps), .out(dfi_clk90));

  // Measurement sequencing in the dfi_clk0 domain.
  always_ff @(posedge dfi_clk0 or negedge rst_n) begin
    if (!rst_n) begin
      dll_done      <= 1'b0;
      tdc_meas_done <= 1'b0;
      period_taps   <= '0;
      deg90_taps    <= '0;
      cnt           <= 0;
      busy          <= 1'b1;
    end else begin
      tdc_meas_done <= 1'b0;
      if (busy) begin
        cnt <= cnt + 1;
        if (cnt >= (dll_done ? MEAS_CYCLES : LOCK_CYCLES)) begin
          period_taps   <= 8'(period_ps / longint'(tap_ps));
          deg90_taps    <= tap_t'((period_ps / longint'(tap_ps)) / 4);
          busy          <= 1'b0;
          cnt           <= 0;
          if (dll_done) tdc_meas_done <= 1'b1;
          dll_done      <= 1'b1;
        end
      end else if (tdc_meas && !tdc_meas_done) begin
        busy <= 1'b1;
      end
    end
  end
endmodule
