// Read-data FIFO of a DQ slice: strobe domain to dfi_clk0 domain.
//
// Each falling edge of wclk (the delayed masked strobe, masked_DQS90_d)
// writes one WIDTH-bit word: the two bits the slice captured on the rising and
// the falling edge of the preceding strobe pulse. There is no write enable:
// the masked strobe only toggles while read data arrive. The falling edge of
// the delayed strobe comes a quarter period after the falling-edge capture and
// a quarter period before the next rising-edge capture, so both bits are
// stable. The read side runs on rclk (dfi_clk0): when rinc is high and the
// FIFO is not empty, the next word appears on rdata with rddata_valid high one
// cycle later. Pointers cross domains in Gray code through two-flop
// synchronisers. fifo_reset_n and reset_n both clear it.
// The port list follows the DQ slice diagram; depth, write edge and the
// read handshake are this design's choices.
`timescale 1ps/1ps
module async_fifo #(
  parameter int unsigned WIDTH = 2,
  parameter int unsigned AW    = 3     // depth 2**AW
) (
  input  logic             wclk,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic             rinc,
  output logic [WIDTH-1:0] rdata,
  output logic             rddata_valid,
  input  logic             fifo_reset_n,
  input  logic             reset_n
);
  logic             rst_n;
  logic [WIDTH-1:0] mem [2**AW];
  logic [AW:0]      wbin, wgray, rbin, rgray;
  logic [AW:0]      wgray_s1, wgray_s2;
  logic             empty;

  assign rst_n = fifo_reset_n & reset_n;

  // Write side.
  always_ff @(negedge wclk or negedge rst_n)
    if (!rst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else begin
      wbin  <= wbin + 1'b1;
      wgray <= (wbin + 1'b1) ^ ((wbin + 1'b1) >> 1);
    end

  always_ff @(negedge wclk)
    mem[wbin[AW-1:0]] <= wdata;

  // Read side.
  always_ff @(posedge rclk or negedge rst_n)
    if (!rst_n) begin
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
    end

  assign empty = (rgray == wgray_s2);

  always_ff @(posedge rclk or negedge rst_n)
    if (!rst_n) begin
      rbin         <= '0;
      rgray        <= '0;
      rdata        <= '0;
      rddata_valid <= 1'b0;
    end else begin
      rddata_valid <= 1'b0;
      if (rinc && !empty) begin
        rdata        <= mem[rbin[AW-1:0]];
        rddata_valid <= 1'b1;
        rbin         <= rbin + 1'b1;
        rgray        <= (rbin + 1'b1) ^ ((rbin + 1'b1) >> 1);
      end
    end
endmodule
