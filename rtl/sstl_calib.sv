// SSTL driver impedance calibration engine.
//
// Finds the leg codes of the pull-up (p) and pull-down (n) halves of the SSTL
// driver against a replica ("dummy SSTL") whose pad is tied to an external
// resistor, and holds them for the drivers.
//   * p search: the replica pull-up drives the external resistor; the
//     comparator cmp_p is high when the pad is above VDDQ/2, i.e. the pull-up
//     is stronger than the resistor. A successive-approximation search, MSB
//     first, keeps each trial bit only if the pull-up is not too strong.
//   * n search: the calibrated pull-up drives the replica pull-down; cmp_n is
//     high when the node is above VDDQ/2 (pull-down too weak); a trial bit is
//     kept while the pull-down is still too weak or just right.
// Each trial code is held SETTLE cycles before the comparator is read.
//
// Handshake: act high in idle starts a search; busy is high until fsm_done,
// which is high for one cycle with the new codes on p_code_new/n_code_new.
// wr high in idle copies those codes to p_code/n_code (the driver codes) and
// answers with calib_done for one cycle. Keeping search and write apart lets
// the update handler spread them over two refresh intervals.
// The handshake signal names come from the update-handler diagram and the
// replica with its external resistor from the block diagram. The binary
// search, the code width and the comparator polarity are this design's
// choices: the document names the algorithm only as more accurate than
// earlier ones and does not give it. Calibration at VDDQ and slew-rate control,
// which the document mentions, are not modelled.
`timescale 1ps/1ps
module sstl_calib #(
  parameter int unsigned CODE_W = 6,
  parameter int unsigned SETTLE = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              act,
  input  logic              wr,
  input  logic              cmp_p,
  input  logic              cmp_n,
  output logic [CODE_W-1:0] p_trial,
  output logic [CODE_W-1:0] n_trial,
  output logic [CODE_W-1:0] p_code_new,
  output logic [CODE_W-1:0] n_code_new,
  output logic [CODE_W-1:0] p_code,
  output logic [CODE_W-1:0] n_code,
  output logic              busy,
  output logic              fsm_done,
  output logic              calib_done
);
  typedef enum logic [2:0] {S_IDLE, S_P, S_N, S_DONE, S_WRITE} state_t;

  state_t            state;
  logic [CODE_W-1:0] bit_q;     // trial bit, one-hot
  logic [7:0]        wait_q;
  logic [CODE_W-1:0] p_kept, n_kept;   // trial code after judging the current bit

  always_comb begin
    p_kept = cmp_p ? (p_trial & ~bit_q) : p_trial;
    n_kept = cmp_n ? n_trial : (n_trial & ~bit_q);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state      <= S_IDLE;
      bit_q      <= '0;
      wait_q     <= '0;
      p_trial    <= '0;
      n_trial    <= '0;
      p_code_new <= '0;
      n_code_new <= '0;
      // Mid-scale codes until the first calibration has been written.
      p_code     <= CODE_W'(1) << (CODE_W-1);
      n_code     <= CODE_W'(1) << (CODE_W-1);
    end else begin
      unique case (state)
        S_IDLE: begin
          if (act) begin
            bit_q   <= CODE_W'(1) << (CODE_W-1);
            p_trial <= CODE_W'(1) << (CODE_W-1);
            n_trial <= '0;
            wait_q  <= '0;
            state   <= S_P;
          end else if (wr) begin
            p_code <= p_code_new;
            n_code <= n_code_new;
            state  <= S_WRITE;
          end
        end
        S_P: begin
          wait_q <= wait_q + 1'b1;
          if (wait_q == 8'(SETTLE - 1)) begin
            wait_q <= '0;
            if (bit_q[0]) begin
              p_trial <= p_kept;
              bit_q   <= CODE_W'(1) << (CODE_W-1);
              n_trial <= CODE_W'(1) << (CODE_W-1);
              state   <= S_N;
            end else begin
              p_trial <= p_kept | (bit_q >> 1);
              bit_q   <= bit_q >> 1;
            end
          end
        end
        S_N: begin
          wait_q <= wait_q + 1'b1;
          if (wait_q == 8'(SETTLE - 1)) begin
            wait_q <= '0;
            if (bit_q[0]) begin
              n_trial    <= n_kept;
              p_code_new <= p_trial;
              n_code_new <= n_kept;
              state      <= S_DONE;
            end else begin
              n_trial <= n_kept | (bit_q >> 1);
              bit_q   <= bit_q >> 1;
            end
          end
        end
        S_DONE:  state <= S_IDLE;
        S_WRITE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end

  always_comb begin
    busy       = (state == S_P) || (state == S_N) || (state == S_DONE);
    fsm_done   = (state == S_DONE);
    calib_done = (state == S_WRITE);
  end
endmodule
