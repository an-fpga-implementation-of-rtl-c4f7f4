// tb_beek_sync: a baseband stream of silence followed by six OFDM-like
// symbols, each preceded by a copy of its last 256 samples, with a carrier
// frequency offset of eps = 0.3 subcarrier and small noise, one sample every
// four clocks. The first three symbols have a constant envelope and random
// phase, like the Zadoff-Chu training symbol; the last three have random
// samples, like data symbols. Checks: no peak during the silence; exactly
// one peak per symbol; for the constant-envelope symbols the peak is flagged
// exactly PEAK_LAT = 5 samples after the symbol's last sample (the end of the
// matching correlation window); for data symbols it may come up to 24
// samples early (the first local minimum under the threshold); the angle is
// -2*pi*eps within 0.005 of a turn.
//
// The estimator and peak rule are the reference design's; the stimulus and
// the tolerances are this testbench's own.
`timescale 1ns/1ps
module tb_beek_sync;
  import ofdm_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real EPS = 0.3;
  localparam int  NSYMB = 6, SIL = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv = 0, peak;
  cplx_t din = '0;
  logic [AW-1:0] angle;
  logic [31:0] metric, energy;
  beek_sync dut (.clk, .rst_n, .in_valid(iv), .in_data(din), .peak, .angle,
                 .metric_o(metric), .energy_o(energy));

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int nin = 0, npeaks = 0;
  int got [NSYMB];
  function automatic int end_of(input int j); return SIL + (j + 1) * 1280 - 1; endfunction
  always @(posedge clk) begin
    #1;
    if (peak) begin
      automatic int lat;
      automatic real a = real'($signed(angle)) / 16777216.0 + EPS;
      npeaks++;
      checks++;
      begin
        automatic int j = -1;
        for (int k = 0; k < NSYMB; k++) begin
          lat = (nin - 1) - end_of(k);
          if (lat >= -24 && lat <= 5) j = k;
        end
        if (j < 0) begin failures++; $display("unexpected peak at sample %0d", nin - 1); end
        else begin
          lat = (nin - 1) - end_of(j);
          got[j]++;
          if (j < 3 && lat != 5) begin failures++; $display("symbol %0d: peak latency %0d samples", j, lat); end
          if (j >= 3) $display("data symbol %0d: peak latency %0d samples", j, lat);
        end
      end
      checks++;
      if (fabs(a) > 0.005) begin failures++; $display("angle %f turns, expected %f", real'($signed(angle)) / 16777216.0, -EPS); end
    end
  end

  task automatic send(input real r, input real i);
    real ph = 2.0 * PI * EPS * real'(nin) / 1024.0;
    real nr = real'($urandom_range(0, 20)) - 10.0, ni = real'($urandom_range(0, 20)) - 10.0;
    @(negedge clk);
    din.re = DW'($rtoi(r * $cos(ph) - i * $sin(ph) + nr));
    din.im = DW'($rtoi(r * $sin(ph) + i * $cos(ph) + ni));
    iv = 1;
    @(negedge clk); iv = 0;
    @(negedge clk); @(negedge clk);
    nin++;
  endtask

  initial begin
    real sr [1024], si [1024];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < SIL; k++) send(0.0, 0.0);
    for (int s = 0; s < NSYMB; s++) begin
      for (int k = 0; k < 1024; k++) begin
        if (s < 3) begin
          automatic real p = 2.0 * PI * real'($urandom_range(0, 65535)) / 65536.0;
          sr[k] = 3000.0 * $cos(p); si[k] = 3000.0 * $sin(p);
        end else begin
          sr[k] = real'($urandom_range(0, 6000)) - 3000.0;
          si[k] = real'($urandom_range(0, 6000)) - 3000.0;
        end
      end
      for (int k = 768; k < 1024; k++) send(sr[k], si[k]);
      for (int k = 0; k < 1024; k++) send(sr[k], si[k]);
    end
    for (int k = 0; k < 300; k++) send(0.0, 0.0);
    for (int j = 0; j < NSYMB; j++) begin
      checks++; if (got[j] != 1) begin failures++; $display("symbol %0d: %0d peaks", j, got[j]); end
    end
    checks++;
    if (npeaks != NSYMB) begin failures++; $display("%0d peaks for %0d symbols", npeaks, NSYMB); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
