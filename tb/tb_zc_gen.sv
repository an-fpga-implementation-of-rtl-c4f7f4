// tb_zc_gen: the full 607-element, root-25 Zadoff-Chu sequence against
// A*exp(-j*pi*u*n*(n+1)/NZC) computed in floating point, twice (checking
// 'restart'), with the generator's latency of 18 clocks.
//
// A ZC training sequence is the reference design's; length 607 and root 25
// are this design's own.
`timescale 1ns/1ps
module tb_zc_gen;
  import ofdm_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic restart = 0, next = 0, zv;
  cplx_t zc;
  zc_gen dut (.clk, .rst_n, .restart, .next, .zc_valid(zv), .zc);

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_out = 0, n_in = 0, cyc = 0, t_first = 0;
  always @(posedge clk) begin
    cyc++;
    #1;
    if (zv) begin
      automatic int n = n_out % 607;
      automatic real ph = -PI * 25.0 * real'(n) * real'(n + 1) / 607.0;
      automatic real er = 2896.0 * $cos(ph), ei = 2896.0 * $sin(ph);
      checks++;
      if (fabs(real'(zc.re) - er) > 4.0 || fabs(real'(zc.im) - ei) > 4.0) begin
        failures++; if (failures < 10) $display("n=%0d got %0d,%0d exp %0.1f,%0.1f", n, zc.re, zc.im, er, ei);
      end
      if (n_out == 0) begin
        checks++;
        if (cyc - t_first != 18) begin failures++; $display("latency %0d", cyc - t_first); end
      end
      n_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk); restart = 1;
      @(negedge clk); restart = 0;
      for (int n = 0; n < 607; n++) begin
        if (n == 0 && pass == 0) t_first = cyc;
        next = 1;
        @(negedge clk);
        if (n % 7 == 3) begin next = 0; @(negedge clk); end
      end
      next = 0;
      repeat (30) @(negedge clk);
    end
    checks++; if (n_out != 2 * 607) begin failures++; $display("got %0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
