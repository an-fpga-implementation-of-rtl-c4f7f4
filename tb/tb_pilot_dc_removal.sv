// tb_pilot_dc_removal: streams the twelve symbols of a frame, N carriers
// each in logical order with random values and kind tags computed here
// independently (guards 0..207 and 816..1023, DC 512, pilots every 6th
// loaded carrier in symbols 0, 4, 8), with a few tags deliberately wrong.
// Checks: exactly the data carriers come out, in order, with their values
// and symbol numbers, one clock after their input; 505 of them in a pilot
// symbol and 607 in the others; 'mismatch' pulses exactly for the wrong
// tags.
//
// The carrier layout is the reference design's; the tag check is this
// design's own.
`timescale 1ns/1ps
module tb_pilot_dc_removal;
  import ofdm_pkg::*;
  localparam int N = 1024, G = 208;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv = 0, ov, mm;
  logic [9:0] ii = '0;
  logic [3:0] is = '0, os;
  car_kind_e ik = CAR_NULL;
  cplx_t ix = '0, ox;
  pilot_dc_removal #(.N(N)) dut (.clk, .rst_n, .in_valid(iv), .in_idx(ii), .in_kind(ik), .in_sym(is),
    .in_x(ix), .out_valid(ov), .out_sym(os), .out_x(ox), .mismatch(mm));

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic car_kind_e kind_of(input int c, input int s);
    int u;
    if (c < G || c >= N - G || c == N / 2) return CAR_NULL;
    u = c > N / 2 ? c - G - 1 : c - G;
    return (s % 4 == 0 && u % 6 == 0) ? CAR_PILOT : CAR_DATA;
  endfunction

  cplx_t ex [$];
  int    es [$], tin [$];
  int    cyc = 0, nout [12], nmm = 0, bad = 0;
  logic  exp_mm = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    #1;
    checks++;
    if (mm != exp_mm) begin failures++; if (bad++ < 5) $display("mismatch flag %0d, expected %0d", mm, exp_mm); end
    if (mm) nmm++;
    if (ov) begin
      automatic cplx_t x = ex.pop_front();
      automatic int s = es.pop_front(), t0 = tin.pop_front();
      nout[s]++;
      checks++;
      if (ox != x || os != 4'(s) || cyc - t0 != 1) begin
        failures++; if (bad++ < 5) $display("output %0d,%0d sym %0d after %0d clocks", ox.re, ox.im, os, cyc - t0);
      end
    end
  end

  initial begin
    int nwrong = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 12; s++) begin
      for (int c = 0; c < N; c++) begin
        automatic car_kind_e k = kind_of(c, s);
        automatic logic wrong = ($urandom_range(0, 199) == 0);
        @(negedge clk);
        iv = 1; ii = 10'(c); is = 4'(s);
        ix.re = 16'($urandom); ix.im = 16'($urandom);
        ik = wrong ? car_kind_e'((int'(k) + 1) % 3) : k;
        if (wrong) nwrong++;
        if (k == CAR_DATA) begin ex.push_back(ix); es.push_back(s); tin.push_back(cyc); end
        fork begin @(posedge clk); #0.5; exp_mm = wrong; end join_none
      end
      @(negedge clk); iv = 0;
      fork begin @(posedge clk); #0.5; exp_mm = 0; end join_none
      repeat ($urandom_range(1, 20)) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    for (int s = 0; s < 12; s++) begin
      checks++;
      if (nout[s] != (s % 4 == 0 ? 505 : 607)) begin failures++; $display("sym %0d: %0d data carriers", s, nout[s]); end
    end
    checks++;
    if (nmm != nwrong) begin failures++; $display("%0d mismatches flagged for %0d wrong tags", nmm, nwrong); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
