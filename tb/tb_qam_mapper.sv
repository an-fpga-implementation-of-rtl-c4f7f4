// tb_qam_mapper: all QPSK and 16-QAM inputs against the Gray table
// written out independently (sign bit 0 -> positive, amplitude bit
// 0 -> inner level 1024, 1 -> outer level 3072; QPSK level 2048).
//
// QPSK and 16-QAM are the reference design's; mapping and amplitudes are this
// design's own.
`timescale 1ns/1ps
module tb_qam_mapper;
  import ofdm_pkg::*;
  int checks = 0, failures = 0;
  logic mod16;
  logic [3:0] bits;
  cplx_t sym;
  qam_mapper dut (.mod16, .bits, .sym);
  localparam int L16 [4] = '{1024, -1024, 3072, -3072};  // index {amp, sign}
  initial begin
    for (int m = 0; m < 2; m++)
      for (int b = 0; b < 16; b++) begin
        int er, ei;
        mod16 = m[0]; bits = 4'(b);
        #1;
        if (m == 0) begin
          er = b[0] ? -2048 : 2048; ei = b[1] ? -2048 : 2048;
        end else begin
          er = L16[{b[2], b[0]}]; ei = L16[{b[3], b[1]}];
        end
        checks++;
        if (int'(sym.re) != er || int'(sym.im) != ei) begin
          failures++; $display("mod16=%0d bits=%b got %0d,%0d exp %0d,%0d", m, bits, sym.re, sym.im, er, ei);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
