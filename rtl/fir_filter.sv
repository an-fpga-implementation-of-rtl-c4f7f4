// fir_filter: complex direct-form FIR with a strobe, used by the up- and
// down-converters.
//
// On each clock with 'en' the sample 'x' enters the delay line and the
// output 'y' (registered, valid the clock after 'en') becomes
//   y = sat( sum_i c_i * x[n-i] >> SHIFT ),  rounded.
// Both rails use the same real taps. KIND selects the taps from ofdm_pkg:
// 0 = square-root raised cosine, 1 = halfband. Q15 taps with SHIFT=15 give
// unity DC gain; SHIFT=14 gives the gain of 2 an interpolator needs after
// zero stuffing. The callers stuff zeros or drop outputs to change the rate.
//
// The reference design names the filter types only; the direct form, the
// taps and the scaling are this implementation's.
module fir_filter
  import ofdm_pkg::*;
#(
  parameter int unsigned KIND  = 0,
  parameter int unsigned SHIFT = 15
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  cplx_t x,
  output cplx_t y
);
  localparam int unsigned NT = (KIND == 0) ? SRRC_TAPS : HB_TAPS;

  cplx_t dl [NT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NT; i++) dl[i] <= '0;
    end else if (en) begin
      dl[0] <= x;
      for (int i = 1; i < NT; i++) dl[i] <= dl[i-1];
    end
  end

  // the output uses the sample entering now plus the NT-1 newest stored ones
  cplx_t win [NT];
  assign win[0] = x;
  for (genvar i = 1; i < NT; i++) begin : g_win
    assign win[i] = dl[i-1];
  end

  function automatic int coef(input int unsigned i);
    return (KIND == 0) ? srrc_coef(i) : hb_coef(i);
  endfunction

  logic signed [63:0] acc_re, acc_im;
  always_comb begin
    acc_re = 0;
    acc_im = 0;
    for (int i = 0; i < NT; i++) begin
      acc_re = acc_re + longint'(win[i].re) * longint'(coef(i));
      acc_im = acc_im + longint'(win[i].im) * longint'(coef(i));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else if (en) y <= sat_cplx((acc_re + (64'sd1 <<< (SHIFT - 1))) >>> SHIFT,
                               (acc_im + (64'sd1 <<< (SHIFT - 1))) >>> SHIFT);
  end
endmodule
