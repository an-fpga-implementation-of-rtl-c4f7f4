// qam_mapper: maps bits to QPSK or 16-QAM constellation points.
//
// Combinational. Gray mapping as in 3GPP TS 36.211: bits[0] and bits[1] give
// the signs of I and Q (0 -> positive); for 16-QAM bits[2] and bits[3] select
// the inner (0) or outer (1) amplitude of I and Q. QPSK points are
// +-A_QPSK on each rail, 16-QAM points +-A_16QAM and +-3*A_16QAM. The
// reference design names QPSK and 16-QAM; the amplitudes and bit order are
// this implementation's.
module qam_mapper
  import ofdm_pkg::*;
(
  input  logic       mod16,   // 0: QPSK, 1: 16-QAM
  input  logic [3:0] bits,
  output cplx_t      sym
);
  function automatic logic signed [DW-1:0] level(input logic sgn, input logic outer, input logic m16);
    int a;
    a = m16 ? (outer ? 3 * A_16QAM : A_16QAM) : A_QPSK;
    return sgn ? DW'(-a) : DW'(a);
  endfunction

  always_comb begin
    sym.re = level(bits[0], bits[2], mod16);
    sym.im = level(bits[1], bits[3], mod16);
  end
endmodule
