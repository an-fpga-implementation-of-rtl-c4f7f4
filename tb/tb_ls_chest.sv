// tb_ls_chest: feeds symbols 0..5 of a frame, carriers in logical order on
// consecutive clocks, through a channel that is linear across the band
// (so linear interpolation between pilots is exact) and different for each
// symbol. Pilot symbols (0 and 4) carry the QPSK pilots of the PRBS-9
// sequence (modelled here independently from its recurrence); all other
// carriers carry random values. Checks on every replayed carrier: order
// (index 0..N-1, one per clock, N outputs per symbol), carrier kind, symbol
// number, the stored sample, and the channel value: the LS/interpolated
// channel of the latest pilot symbol (held through symbols 1..3, renewed at
// symbol 4) within 3 LSB, and zero on null carriers. Cycle counts: replay
// starts NUSE+1 = 608 clocks after a pilot symbol's last carrier (the
// interpolation pass) and 1 clock after a data symbol's.
//
// LS estimation, linear interpolation and the hold are the reference
// design's; the channel model and pilot values are this design's own.
`timescale 1ns/1ps
module tb_ls_chest;
  import ofdm_pkg::*;
  localparam int N = 1024, G = 208, NUSE = 607;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv = 0, ov, busy;
  logic [9:0] ii = '0, oi;
  logic [3:0] is = '0, os;
  cplx_t id = '0, oy, oh;
  car_kind_e ok;
  ls_chest #(.N(N)) dut (.clk, .rst_n, .in_valid(iv), .in_idx(ii), .in_data(id), .in_sym(is),
    .out_valid(ov), .out_idx(oi), .out_kind(ok), .out_sym(os), .out_y(oy), .out_h(oh), .busy);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction
  function automatic int ucar(input int c);   // loaded carrier number, -1 if null
    if (c < G || c >= N - G || c == N / 2) return -1;
    return c > N / 2 ? c - G - 1 : c - G;
  endfunction

  // channel of the current symbol: h(u) = (a + b*u/606), in units of 2048
  real a_re, a_im, br, bi;
  real hr_est [NUSE], hi_est [NUSE];
  cplx_t ystore [N];
  int cur_sym;
  int t_last = 0, cyc = 0, nout = 0, bad = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    #1;
    if (ov) begin
      automatic int u = ucar(nout);
      automatic car_kind_e ek = u < 0 ? CAR_NULL : ((cur_sym % 4 == 0 && u % 6 == 0) ? CAR_PILOT : CAR_DATA);
      if (nout == 0) begin
        automatic int want = (cur_sym % 4 == 0) ? NUSE + 1 : 1;
        checks++;
        if (cyc - t_last != want) begin failures++; $display("sym %0d: replay after %0d clocks, want %0d", cur_sym, cyc - t_last, want); end
      end
      checks++;
      if (oi != 10'(nout) || ok != ek || os != 4'(cur_sym) || oy != ystore[nout]) begin
        failures++;
        if (bad++ < 5) $display("sym %0d carrier %0d: idx %0d kind %0d/%0d sym %0d y ok %0d", cur_sym, nout, oi, ok, ek, os, oy == ystore[nout]);
      end
      checks++;
      if (u < 0 ? (oh != '0) : (fabs(real'(oh.re) - hr_est[u]) > 3.0 || fabs(real'(oh.im) - hi_est[u]) > 3.0)) begin
        failures++;
        if (bad++ < 5) $display("sym %0d carrier %0d: h %0d,%0d", cur_sym, nout, oh.re, oh.im);
      end
      nout++;
    end
  end

  initial begin
    logic pb [2000];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // pilot sign bits: b[n] = 1 for n < 9, then b[n] = b[n-9] ^ b[n-5]
    for (int n = 0; n < 2000; n++) pb[n] = n < 9 ? 1'b1 : pb[n-9] ^ pb[n-5];
    for (int s = 0; s < 6; s++) begin
      automatic int np = 0;
      a_re = real'($urandom_range(0, 1000)) / 1000.0 - 0.5 + 1.0;
      a_im = real'($urandom_range(0, 1000)) / 1000.0 - 0.5;
      br = 4.0 * real'($urandom_range(0, 1000)) / 1000.0 - 2.0;   // steep: up to 40 LSB per pilot spacing
      bi = 4.0 * real'($urandom_range(0, 1000)) / 1000.0 - 2.0;
      if (s % 4 == 0)
        for (int u = 0; u < NUSE; u++) begin
          hr_est[u] = 2048.0 * (a_re + br * real'(u) / 606.0);
          hi_est[u] = 2048.0 * (a_im + bi * real'(u) / 606.0);
        end
      cur_sym = s; nout = 0;
      for (int c = 0; c < N; c++) begin
        automatic int u = ucar(c);
        automatic real xr, xi, hr, hi;
        hr = a_re + br * real'(u) / 606.0;
        hi = a_im + bi * real'(u) / 606.0;
        if (s % 4 == 0 && u >= 0 && u % 6 == 0) begin
          xr = pb[2*np] ? -2048.0 : 2048.0;
          xi = pb[2*np+1] ? -2048.0 : 2048.0;
          np++;
        end else begin
          xr = real'($urandom_range(0, 6000)) - 3000.0;
          xi = real'($urandom_range(0, 6000)) - 3000.0;
        end
        @(negedge clk);
        iv = 1; ii = 10'(c); is = 4'(s);
        id.re = 16'($rtoi(xr * hr - xi * hi));
        id.im = 16'($rtoi(xr * hi + xi * hr));
        ystore[c] = id;
      end
      @(negedge clk); iv = 0; t_last = cyc;
      wait (!busy); @(negedge clk);
      checks++;
      if (nout != N) begin failures++; $display("sym %0d: %0d outputs", s, nout); end
      repeat ($urandom_range(0, 50)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
