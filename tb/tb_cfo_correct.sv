// tb_cfo_correct: loads random offset angles (two loads, to check that
// 'load' restarts the phase) and feeds a stream of random samples, one
// 'adv' every four clocks, with 'in_valid' on three samples out of four.
// Each output must equal the input rotated by angle*k/N, where k counts
// the samples since the load, within 3 LSB, and must appear exactly 18
// clocks (CORDIC latency) after its input.
//
// The rotation by angle*k/N is the reference design's equation; the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_cfo_correct;
  import ofdm_pkg::*;
  localparam int N = 1024;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load = 0, adv = 0, iv = 0, ov;
  logic [AW-1:0] ang = '0;
  cplx_t din = '0, dout;
  cfo_correct #(.N(N)) dut (.clk, .rst_n, .load, .angle(ang), .adv, .in_valid(iv), .in_data(din),
    .out_valid(ov), .out_data(dout));

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction

  real er [$], ei [$];
  int  tin [$];
  int  cyc = 0, nout = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    #1;
    if (ov) begin
      automatic real r = er.pop_front(), i = ei.pop_front();
      automatic int t0 = tin.pop_front();
      nout++;
      checks++;
      if (fabs(real'(dout.re) - r) > 3.0 || fabs(real'(dout.im) - i) > 3.0) begin
        failures++; $display("got %0d,%0d exp %0.1f,%0.1f", dout.re, dout.im, r, i);
      end
      checks++;
      if (cyc - t0 != 18) begin failures++; $display("latency %0d", cyc - t0); end
    end
  end

  initial begin
    int nexp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < 2; l++) begin
      automatic int a = int'($urandom_range(0, 2000000)) - 1000000;   // |eps| up to ~0.06 turn
      @(negedge clk); load = 1; ang = AW'(a);
      @(negedge clk); load = 0;
      for (int k = 0; k < 3000; k++) begin
        automatic real ph = 2.0 * PI * real'(a) * real'(k) / real'(N) / 16777216.0;
        automatic real xr = real'($urandom_range(0, 20000)) - 10000.0;
        automatic real xi = real'($urandom_range(0, 20000)) - 10000.0;
        adv = 1; iv = (k % 4) != 2;
        din.re = 16'(int'(xr)); din.im = 16'(int'(xi));
        if (iv) begin
          er.push_back(xr * $cos(ph) - xi * $sin(ph));
          ei.push_back(xr * $sin(ph) + xi * $cos(ph));
          tin.push_back(cyc);
          nexp++;
        end
        @(negedge clk); adv = 0; iv = 0;
        repeat (3) @(negedge clk);
      end
    end
    repeat (40) @(negedge clk);
    checks++;
    if (nout != nexp) begin failures++; $display("%0d outputs for %0d inputs", nout, nexp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
