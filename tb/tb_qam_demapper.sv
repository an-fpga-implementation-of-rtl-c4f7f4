// tb_qam_demapper: hard decisions on every QPSK and 16-QAM point with
// random perturbations smaller than half the decision distance, for all
// bit patterns; the expected bits are the ones that produced the point.
//
// QPSK and 16-QAM are the reference design's; the decision thresholds are
// this design's own.
`timescale 1ns/1ps
module tb_qam_demapper;
  import ofdm_pkg::*;
  int checks = 0, failures = 0;
  logic mod16;
  cplx_t sym;
  logic [3:0] bits;
  qam_demapper dut (.mod16, .sym, .bits);
  function automatic int lvl(input bit m, input bit sgn, input bit amp);
    int a = m ? (amp ? 3072 : 1024) : 2048;
    return sgn ? -a : a;
  endfunction
  initial begin
    for (int rep = 0; rep < 50; rep++)
      for (int m = 0; m < 2; m++)
        for (int b = 0; b < 16; b++) begin
          int nr, ni;
          if (m == 0 && b > 3) continue;
          nr = int'($urandom_range(0, 1800)) - 900;
          ni = int'($urandom_range(0, 1800)) - 900;
          mod16 = m[0];
          sym.re = DW'(lvl(m[0], b[0], b[2]) + nr);
          sym.im = DW'(lvl(m[0], b[1], b[3]) + ni);
          #1;
          checks++;
          if (bits != 4'(b)) begin
            failures++; $display("mod16=%0d point %0d,%0d got %b exp %b", m, sym.re, sym.im, bits, 4'(b));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
