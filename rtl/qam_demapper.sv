// qam_demapper: hard-decision demapper, the inverse of qam_mapper.
//
// Combinational. A negative rail gives a 1 sign bit; for 16-QAM a rail whose
// magnitude exceeds 2*A_16QAM (half way between the inner and outer levels)
// gives a 1 amplitude bit. Bits come out in qam_mapper's order; for QPSK only
// bits[1:0] are meaningful and bits[3:2] are zero.
//
// The reference design only says the data is demodulated back into bits;
// hard decisions and the thresholds are this implementation's.
module qam_demapper
  import ofdm_pkg::*;
(
  input  logic       mod16,
  input  cplx_t      sym,
  output logic [3:0] bits
);
  localparam int TH = 2 * A_16QAM;
  always_comb begin
    bits[0] = sym.re < 0;
    bits[1] = sym.im < 0;
    bits[2] = mod16 && ((sym.re > DW'(TH)) || (sym.re < DW'(-TH)));
    bits[3] = mod16 && ((sym.im > DW'(TH)) || (sym.im < DW'(-TH)));
  end
endmodule
