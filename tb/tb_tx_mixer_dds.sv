// tb_tx_mixer_dds: a random complex input through the transmit mixer at the
// 15 MHz IF, compared with (I*cos(wn) - Q*sin(wn)) * 32000/32768 computed in
// floating point from the same phase-accumulator arithmetic. The pipeline
// alignment between input and oscillator phase is found once; every output
// sample must then match within 3 LSB.
//
// The DDS mixer and 15 MHz IF are the reference design's; amplitudes and
// tolerances are this design's own.
`timescale 1ns/1ps
module tb_tx_mixer_dds;
  import ofdm_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  cplx_t x = '0;
  logic signed [15:0] y;
  tx_mixer_dds dut (.clk, .rst_n, .fcw(FCW_IF), .x, .if_out(y));

  localparam int NS = 600;
  real xr [NS], xi [NS], g [NS];
  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction
  function automatic real expect_at(input int c, input int dx, input int dp);
    // output at clock c uses input c-dx and oscillator phase of clock c-dp
    real ph = 2.0 * PI * real'((longint'(FCW_IF) * longint'(c - dp)) % 64'd4294967296) / 4294967296.0;
    real k = 32000.0 / 32768.0;
    if (c - dx < 0 || c - dp < 0) return 0.0;
    return k * (xr[c - dx] * $cos(ph) - xi[c - dx] * $sin(ph));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int bx = -1, bp = -1;
    for (int n = 0; n < NS; n++) begin
      xr[n] = real'($urandom_range(0, 20000)) - 10000.0;
      xi[n] = real'($urandom_range(0, 20000)) - 10000.0;
    end
    @(negedge clk); rst_n = 1;
    for (int c = 0; c < NS; c++) begin
      x.re = DW'($rtoi(xr[c])); x.im = DW'($rtoi(xi[c]));
      @(posedge clk); #1; g[c] = real'(y);
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
      if (fabs(g[c] - expect_at(c, bx, bp)) > 3.0) begin
        failures++; if (failures < 10) $display("c=%0d got %0.0f exp %0.1f", c, g[c], expect_at(c, bx, bp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
