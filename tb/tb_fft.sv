// tb_fft: checks the burst FFT and IFFT against a floating-point DFT.
// A 64-point forward FFT and a 64-point IFFT are fed random samples; every
// output bin is compared with the reference within a small tolerance, and
// the number of clocks from the last input to the last output is checked
// against the 2N + LOG2N*N/4 schedule. A 1024-point forward transform of a
// single tone checks the full size.
//
// The 1024-point size is the reference design's; the burst schedule and
// scaling checked here are this design's own.
`timescale 1ns/1ps
module tb_fft;
  import ofdm_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rdy_f, ov_f, rdy_i, ov_i, rdy_b, ov_b;
  logic iv_f = 0, iv_i = 0, iv_b = 0;
  cplx_t din_f, din_i, din_b, do_f, do_i, do_b;
  logic [5:0] oi_f, oi_i;
  logic [9:0] oi_b;

  fft #(.N(N), .INVERSE(0), .SHIFT(1), .SCALE_MASK(32'h15)) dut_f (
    .clk, .rst_n, .ready(rdy_f), .in_valid(iv_f), .in_data(din_f),
    .out_valid(ov_f), .out_idx(oi_f), .out_data(do_f));
  fft #(.N(N), .INVERSE(1), .SHIFT(1), .SCALE_MASK(32'h15)) dut_i (
    .clk, .rst_n, .ready(rdy_i), .in_valid(iv_i), .in_data(din_i),
    .out_valid(ov_i), .out_idx(oi_i), .out_data(do_i));
  fft dut_b (
    .clk, .rst_n, .ready(rdy_b), .in_valid(iv_b), .in_data(din_b),
    .out_valid(ov_b), .out_idx(oi_b), .out_data(do_b));

  real xr [N], xi [N];
  real xbr [1024], xbi [1024];

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  function automatic void ref_dft(input int k, input bit inv, output real rr, output real ri);
    real ang, sgn;
    int bin;
    rr = 0; ri = 0;
    sgn = inv ? 1.0 : -1.0;
    for (int n = 0; n < N; n++) begin
      // for the IFFT the input index n is spectrum ordered, for the FFT the output k is
      bin = inv ? (n ^ (N/2)) : (k ^ (N/2));
      ang = sgn * 2.0 * 3.14159265358979 * real'(inv ? bin * k : n * bin) / real'(N);
      rr += xr[n] * $cos(ang) - xi[n] * $sin(ang);
      ri += xr[n] * $sin(ang) + xi[n] * $cos(ang);
    end
    rr = rr / 8.0; ri = ri / 8.0;
  endfunction

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction

  int t_last_in, t_last_out, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    real rr, ri;
    int got_f, got_i;
    din_f = '0; din_i = '0; din_b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      xr[n] = real'($signed($urandom_range(0, 16000)) - 8000);
      xi[n] = real'($signed($urandom_range(0, 16000)) - 8000);
    end
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      iv_f = 1; iv_i = 1;
      din_f.re = DW'($rtoi(xr[n])); din_f.im = DW'($rtoi(xi[n]));
      din_i = din_f;
      @(negedge clk);
    end
    iv_f = 0; iv_i = 0;
    t_last_in = cyc;
    got_f = 0; got_i = 0;
    while (got_f < N || got_i < N) begin
      @(posedge clk); #1;
      if (ov_f) begin
        ref_dft(int'(oi_f), 1'b0, rr, ri);
        checks++;
        if (fabs(real'(do_f.re) - rr) > 24.0 || fabs(real'(do_f.im) - ri) > 24.0) begin
          failures++;
          $display("FFT bin %0d: got %0d,%0d exp %0.1f,%0.1f", oi_f, do_f.re, do_f.im, rr, ri);
        end
        got_f++;
        if (got_f == N) t_last_out = cyc;
      end
      if (ov_i) begin
        ref_dft(int'(oi_i), 1'b1, rr, ri);
        checks++;
        if (fabs(real'(do_i.re) - rr) > 24.0 || fabs(real'(do_i.im) - ri) > 24.0) begin
          failures++;
          $display("IFFT sample %0d: got %0d,%0d exp %0.1f,%0.1f", oi_i, do_i.re, do_i.im, rr, ri);
        end
        got_i++;
      end
    end
    // schedule: 6 stages * 16 clocks + 64 unload (+1 register)
    checks++;
    if (t_last_out - t_last_in > 6 * N / 4 + N + 2) begin
      failures++; $display("latency %0d too long", t_last_out - t_last_in);
    end
    checks++;
    if (!rdy_f) begin failures++; $display("not ready after unload"); end

    // full size: tone at bin 37 (logical carrier 37^512), amplitude 2000
    @(negedge clk);
    for (int n = 0; n < 1024; n++) begin
      iv_b = 1;
      din_b.re = DW'($rtoi(2000.0 * $cos(2.0 * 3.14159265358979 * 37.0 * n / 1024.0)));
      din_b.im = DW'($rtoi(2000.0 * $sin(2.0 * 3.14159265358979 * 37.0 * n / 1024.0)));
      @(negedge clk);
    end
    iv_b = 0;
    got_f = 0;
    while (got_f < 1024) begin
      @(posedge clk); #1;
      if (ov_b) begin
        checks++;
        // 1024 * 2000 / 32 = 64000 -> saturates; expect positive maximum at the tone
        if (oi_b == 10'(37 ^ 512)) begin
          if (do_b.re < 32000 || do_b.im > 100 || do_b.im < -100) begin
            failures++; $display("tone bin got %0d,%0d", do_b.re, do_b.im);
          end
        end else if (do_b.re > 40 || do_b.re < -40 || do_b.im > 40 || do_b.im < -40) begin
          failures++; $display("leak bin %0d got %0d,%0d", oi_b, do_b.re, do_b.im);
        end
        got_f++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
