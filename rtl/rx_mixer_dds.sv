// rx_mixer_dds: receive IF mixer. The real IF input is moved back to
// complex baseband with the receiver's own DDS:
//   I = 2*r*cos(wn) / 2^15,  Q = -2*r*sin(wn) / 2^15,
// the factor 2 restoring the amplitude halved by the mixing. The image at
// twice the IF is removed by the down-converter. Registered output, one
// sample per clock. The receive oscillator is independent of the transmit
// one; a difference in 'fcw' is a carrier frequency offset.
//
// The DDS-and-mixer return to baseband follows the reference design; the
// gain of 2 and the word widths are this implementation's.
module rx_mixer_dds
  import ofdm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [31:0]          fcw,
  input  logic signed [DW-1:0] if_in,
  output cplx_t                y
);
  logic signed [DW-1:0] c, s;
  dds u_dds (.clk, .rst_n, .fcw, .cos_o(c), .sin_o(s));

  logic signed [63:0] pi, pq;
  assign pi = (longint'(if_in) * c + 64'sd8192) >>> 14;
  assign pq = (-longint'(if_in) * s + 64'sd8192) >>> 14;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= sat_cplx(pi, pq);
  end
endmodule
