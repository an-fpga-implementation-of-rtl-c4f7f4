// duc: digital up-converter, baseband (15.36 MS/s) to 61.44 MS/s.
//
// Two interpolate-by-2 stages, as in the reference design: a square-root
// raised cosine (pulse shaping) followed by a halfband. Each stage stuffs a
// zero between input samples and filters at the higher rate with a gain of 2.
// 'phase' is the 0..3 position of the current clock in the baseband sample
// period; a new baseband sample 'x' is taken when phase == 0. 'y' carries a
// new sample every clock. Filter lengths and roll-off are this
// implementation's choice (see ofdm_pkg).
module duc
  import ofdm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] phase,
  input  cplx_t      x,
  output cplx_t      y
);
  cplx_t s1_in, s1_out, s2_in;

  // stage 1 runs at 30.72 MS/s (phases 0 and 2); the input appears at phase 0
  assign s1_in = (phase == 2'd0) ? x : '0;
  fir_filter #(.KIND(0), .SHIFT(14)) u_srrc (
    .clk, .rst_n, .en(!phase[0]), .x(s1_in), .y(s1_out));

  // stage 1 outputs are fresh at phases 1 and 3; zeros in between
  assign s2_in = phase[0] ? s1_out : '0;
  fir_filter #(.KIND(1), .SHIFT(14)) u_hb (
    .clk, .rst_n, .en(1'b1), .x(s2_in), .y(y));
endmodule
