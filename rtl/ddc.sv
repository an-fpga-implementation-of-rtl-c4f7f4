// ddc: digital down-converter, 61.44 MS/s to baseband (15.36 MS/s).
//
// The mirror of the up-converter: a halfband decimate-by-2 followed by the
// square-root raised cosine matched filter, decimate-by-2. Every input
// clock is filtered by the halfband; every second result feeds the SRRC, and
// every second SRRC result is a baseband sample, flagged by 'y_valid'
// (one clock in four). The decimation phase follows an internal free-running
// counter; the synchroniser downstream does not depend on it.
module ddc
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t x,          // one sample per clock
  output logic  y_valid,
  output cplx_t y
);
  logic [1:0] ph;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= '0;
    else        ph <= ph + 1'b1;
  end

  cplx_t hb_out;
  fir_filter #(.KIND(1), .SHIFT(15)) u_hb (
    .clk, .rst_n, .en(1'b1), .x(x), .y(hb_out));

  // hb_out written at ph 0 and 2 is used by the SRRC at ph 1 and 3
  fir_filter #(.KIND(0), .SHIFT(15)) u_srrc (
    .clk, .rst_n, .en(ph[0]), .x(hb_out), .y(y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= (ph == 2'd3);
  end
endmodule
