// tb_duc: random baseband samples through the up-converter, compared with
// a floating-point model (zero-stuff, SRRC x2 gain 2, zero-stuff, halfband
// with gain 2) built from fir_ref_pkg's taps. The model's alignment is
// found once; every output sample must then match within 6 LSB.
//
// The SRRC-then-halfband structure is the reference design's; taps and
// tolerances are this design's own.
`timescale 1ns/1ps
module tb_duc;
  import ofdm_pkg::*;
  import fir_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0] phase = 0;
  cplx_t x = '0, y;
  duc dut (.clk, .rst_n, .phase, .x, .y);

  localparam int NB = 400;
  real xr [NB], xi [NB];
  real yr [4*NB], yi [4*NB];
  real gr [4*NB], gi [4*NB];
  real hs [21], hh [15];

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real s1r [2*NB], s1i [2*NB];
    int n = 0, best = -1;
    srrc_taps(hs); hb_taps(hh);
    for (int k = 0; k < NB; k++) begin
      xr[k] = real'($urandom_range(0, 8000)) - 4000.0;
      xi[k] = real'($urandom_range(0, 8000)) - 4000.0;
    end
    // model
    for (int m = 0; m < 2 * NB; m++) begin
      s1r[m] = 0; s1i[m] = 0;
      for (int j = 0; j < 21; j++)
        if (m - j >= 0 && (m - j) % 2 == 0) begin
          s1r[m] += 2.0 * hs[j] * xr[(m - j) / 2]; s1i[m] += 2.0 * hs[j] * xi[(m - j) / 2];
        end
    end
    for (int m = 0; m < 4 * NB; m++) begin
      yr[m] = 0; yi[m] = 0;
      for (int j = 0; j < 15; j++)
        if (m - j >= 0 && (m - j) % 2 == 0) begin
          yr[m] += 2.0 * hh[j] * s1r[(m - j) / 2]; yi[m] += 2.0 * hh[j] * s1i[(m - j) / 2];
        end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // drive: phase counts 0..3; x is taken at phase 0
    for (int c = 0; c < 4 * NB; c++) begin
      @(negedge clk);
      phase = 2'(c % 4);
      x.re = DW'($rtoi(xr[c / 4])); x.im = DW'($rtoi(xi[c / 4]));
      @(posedge clk); #1;
      gr[c] = real'(y.re); gi[c] = real'(y.im);
    end
    // alignment: got[c + L] = model[c]
    for (int L = 0; L < 12 && best < 0; L++) begin
      automatic bit ok = 1;
      for (int c = 0; c < 200; c++)
        if (fabs(gr[c + L] - yr[c]) > 6.0 || fabs(gi[c + L] - yi[c]) > 6.0) ok = 0;
      if (ok) best = L;
    end
    checks++;
    if (best < 0) begin failures++; $display("no alignment found"); end
    else begin
      for (int c = 0; c + best < 4 * NB; c++) begin
        checks++;
        if (fabs(gr[c + best] - yr[c]) > 6.0 || fabs(gi[c + best] - yi[c]) > 6.0) begin
          failures++; if (failures < 10) $display("c=%0d got %0.0f exp %0.1f", c, gr[c + best], yr[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
