// tb_rx_mixer_dds: a random real IF input through the receive mixer at
// 15 MHz, compared with 2*r*(cos(wn) - j sin(wn)) * 32000/32768 computed in
// floating point from the same phase-accumulator arithmetic. The pipeline
// alignment between input and oscillator phase is found once; both output
// rails must then match within 3 LSB.
//
// The DDS mixer is the reference design's; gains and tolerances are this
// design's own.
`timescale 1ns/1ps
module tb_rx_mixer_dds;
  import ofdm_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic signed [15:0] x = '0;
  cplx_t y;
  rx_mixer_dds dut (.clk, .rst_n, .fcw(FCW_IF), .if_in(x), .y);

  localparam int NS = 600;
  real xr [NS], g [NS], gq [NS];
  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction
  function automatic real expect_at(input int c, input int dx, input int dp, input bit q = 0);
    // output at clock c uses input c-dx and oscillator phase of clock c-dp
    real ph = 2.0 * PI * real'((longint'(FCW_IF) * longint'(c - dp)) % 64'd4294967296) / 4294967296.0;
    real k = 32000.0 / 32768.0;
    if (c - dx < 0 || c - dp < 0) return 0.0;
    return q ? -2.0 * k * xr[c - dx] * $sin(ph) : 2.0 * k * xr[c - dx] * $cos(ph);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int bx = -1, bp = -1;
    for (int n = 0; n < NS; n++) begin
      xr[n] = real'($urandom_range(0, 30000)) - 15000.0;
    end
    @(negedge clk); rst_n = 1;
    for (int c = 0; c < NS; c++) begin
      x = DW'($rtoi(xr[c]));
      @(posedge clk); #1; g[c] = real'(y.re); gq[c] = real'(y.im);
      @(negedge clk);
    end
    for (int dx = 0; dx < 4 && bx < 0; dx++)
      for (int dp = 0; dp < 30 && bx < 0; dp++) begin
        automatic bit ok = 1;
        for (int c = 40; c < 100; c++) if (fabs(g[c] - expect_at(c, dx, dp)) > 3.0) ok = 0;
        if (ok) begin bx = dx; bp = dp; end
      end
    checks++;
    if (bx < 0) begin failures++; $display("no alignment found"); end
    else for (int c = 40; c < NS; c++) begin
      checks++;
      if (fabs(g[c] - expect_at(c, bx, bp)) > 3.0 || fabs(gq[c] - expect_at(c, bx, bp, 1)) > 3.0) begin
        failures++; if (failures < 10) $display("c=%0d got %0.0f exp %0.1f", c, g[c], expect_at(c, bx, bp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
