// tx_mixer_dds: transmit IF mixer. The complex 61.44 MS/s signal is moved to
// the IF set by 'fcw' and made real:
//   if_out = (I*cos(wn) - Q*sin(wn)) / 2^15,
// with cos/sin from a DDS of amplitude 32000 (gain 0.98), rounded and
// saturated. Registered output, one sample per clock. 15 MHz at a 61.44 MHz
// clock (FCW_IF) is the reference design's IF.
module tx_mixer_dds
  import ofdm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [31:0]          fcw,
  input  cplx_t                x,
  output logic signed [DW-1:0] if_out
);
  logic signed [DW-1:0] c, s;
  dds u_dds (.clk, .rst_n, .fcw, .cos_o(c), .sin_o(s));

  logic signed [63:0] p;
  assign p = (longint'(x.re) * c - longint'(x.im) * s + 64'sd16384) >>> 15;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) if_out <= '0;
    else if_out <= (p > 32767) ? 16'sd32767 : (p < -32768) ? -16'sd32768 : DW'(p);
  end
endmodule
