// tb_ddc: random 61.44 MS/s samples through the down-converter, compared
// with a floating-point model (halfband, keep every 2nd, SRRC, keep every
// 2nd) built from fir_ref_pkg's taps. The decimation phase and latency are
// found once; every baseband output must then match within 4 LSB and
// 'y_valid' must come every fourth clock, giving one output per four inputs.
`timescale 1ns/1ps
module tb_ddc;
  import ofdm_pkg::*;
  import fir_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  cplx_t x = '0, y;
  logic yv;
  ddc dut (.clk, .rst_n, .x, .y_valid(yv), .y);

  localparam int NS = 2000;
  real xr [NS], xi [NS], hr [NS], hi [NS];
  real hs [21], hh [15];
  real gr [$], gi [$];
  int  gt [$];

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // model output for halfband phase p0 and SRRC phase p1 at baseband index k
  function automatic void model(input int n, output real r, output real i);
    // n: input sample index where the SRRC output is taken (n even rate-2 point)
    r = 0; i = 0;
    for (int j = 0; j < 21; j++)
      if (n - 2 * j >= 0) begin r += hs[j] * hr[n - 2 * j]; i += hs[j] * hi[n - 2 * j]; end
  endfunction

  initial begin
    int best = -1;
    srrc_taps(hs); hb_taps(hh);
    for (int n = 0; n < NS; n++) begin
      xr[n] = real'($urandom_range(0, 16000)) - 8000.0;
      xi[n] = real'($urandom_range(0, 16000)) - 8000.0;
    end
    for (int n = 0; n < NS; n++) begin
      hr[n] = 0; hi[n] = 0;
      for (int j = 0; j < 15; j++)
        if (n - j >= 0) begin hr[n] += hh[j] * xr[n - j]; hi[n] += hh[j] * xi[n - j]; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NS; c++) begin
      @(negedge clk);
      x.re = DW'($rtoi(xr[c])); x.im = DW'($rtoi(xi[c]));
      @(posedge clk); #1;
      if (yv) begin gr.push_back(real'(y.re)); gi.push_back(real'(y.im)); gt.push_back(c); end
    end
    // output count: one baseband sample per four input samples
    checks++;
    if (gt.size() < NS / 4 - 2 || gt.size() > NS / 4) begin
      failures++; $display("output count %0d", gt.size());
    end
    // 'y_valid' spacing
    for (int k = 1; k < gt.size(); k++) begin
      checks++; if (gt[k] - gt[k-1] != 4) begin failures++; $display("valid spacing %0d", gt[k] - gt[k-1]); end
    end
    // find offset D: output k corresponds to model at input index gt[k] - D
    for (int D = 0; D < 40 && best < 0 && gt.size() >= 80; D++) begin
      automatic bit ok = 1;
      for (int k = 20; k < 80; k++) begin
        real r, i;
        model(gt[k] - D, r, i);
        if (fabs(gr[k] - r) > 4.0 || fabs(gi[k] - i) > 4.0) ok = 0;
      end
      if (ok) best = D;
    end
    checks++;
    if (best < 0) begin failures++; $display("no alignment found"); end
    else for (int k = 20; k < gt.size(); k++) begin
      real r, i;
      model(gt[k] - best, r, i);
      checks++;
      if (fabs(gr[k] - r) > 4.0 || fabs(gi[k] - i) > 4.0) begin
        failures++; if (failures < 10) $display("k=%0d got %0.0f exp %0.1f", k, gr[k], r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
