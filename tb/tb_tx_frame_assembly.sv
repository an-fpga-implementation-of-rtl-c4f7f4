// tb_tx_frame_assembly: two whole frames (QPSK, then 16-QAM) into a model of
// the IFFT's ready handshake. Every one of the 1024 carriers of every symbol
// is compared with an independent model: zero on guards and DC, the
// Zadoff-Chu formula on the training symbol, QPSK pilots whose signs follow
// b[n] = b[n-9] XOR b[n-5] in pilot symbols 1, 5, 9, and mapped PRBS-23 data
// elsewhere. Also checks N carriers per symbol and the pilot count.
//
// Pilot pattern, guards and frame length are the reference design's; the
// pilot values and ZC parameters are this design's own.
`timescale 1ns/1ps
module tb_tx_frame_assembly;
  import ofdm_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enable = 0, mod16 = 0, fft_ready = 1, space = 1, fv, fstart;
  cplx_t fd;
  logic [3:0] sidx;
  tx_frame_assembly dut (.clk, .rst_n, .enable, .mod16, .fft_ready, .space,
    .fft_valid(fv), .fft_data(fd), .sym_idx(sidx), .frame_start(fstart));

  bit dh [$];
  int dpos = 0;
  function automatic bit dbit();
    while (dh.size() <= dpos) begin
      if (dh.size() < 23) dh.push_back(1'b1);
      else dh.push_back(dh[dh.size() - 23] ^ dh[dh.size() - 18]);
    end
    dpos++;
    return dh[dpos - 1];
  endfunction
  bit ph [$];
  function automatic bit pbit(input int n);
    while (ph.size() <= n) begin
      if (ph.size() < 9) ph.push_back(1'b1);
      else ph.push_back(ph[ph.size() - 9] ^ ph[ph.size() - 5]);
    end
    return ph[n];
  endfunction

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // IFFT handshake model: busy for a while after N samples
  int nin = 0;
  always @(posedge clk) begin
    if (fv) begin
      nin++;
      if (nin == 1024) begin
        nin = 0;
        fft_ready <= 0;
        fork begin repeat (200) @(posedge clk); fft_ready <= 1; end join_none
      end
    end
  end

  int sym = 0, car = 0, pil = 0, zcn = 0, frame_mod = 0, npil_sym = 0;
  always @(posedge clk) begin
    #1;
    if (fv) begin
      automatic int s = sym % 13;
      automatic bit psym = (s != 0) && ((s - 1) % 4 == 0);
      automatic bit null_c = (car < 208) || (car > 815) || (car == 512);
      automatic int u = car - 208 - (car > 512 ? 1 : 0);
      automatic int er = 0, ei = 0;
      automatic real tol = 0.0;
      if (car == 0) pil = 0;
      if (car == 0 && s == 0) zcn = 0;
      if (null_c) begin er = 0; ei = 0; end
      else if (s == 0) begin
        automatic real phs = -PI * 25.0 * real'(zcn) * real'(zcn + 1) / 607.0;
        er = $rtoi(2896.0 * $cos(phs)); ei = $rtoi(2896.0 * $sin(phs)); tol = 4.0; zcn++;
      end else if (psym && (u % 6) == 0) begin
        er = pbit(2 * pil) ? -2048 : 2048; ei = pbit(2 * pil + 1) ? -2048 : 2048; pil++;
        if (pil == 102) npil_sym++;
      end else begin
        automatic bit b0 = dbit(), b1 = dbit(), b2 = 0, b3 = 0;
        if (frame_mod) begin b2 = dbit(); b3 = dbit(); end
        if (frame_mod) begin
          er = (b2 ? 3072 : 1024) * (b0 ? -1 : 1); ei = (b3 ? 3072 : 1024) * (b1 ? -1 : 1);
        end else begin
          er = b0 ? -2048 : 2048; ei = b1 ? -2048 : 2048;
        end
      end
      checks++;
      if (fabs(real'(fd.re) - real'(er)) > tol || fabs(real'(fd.im) - real'(ei)) > tol) begin
        failures++;
        if (failures < 10) $display("sym %0d car %0d: got %0d,%0d exp %0d,%0d", s, car, fd.re, fd.im, er, ei);
      end
      car++;
      if (car == 1024) begin
        car = 0; sym++;
        if (sym % 13 == 0) frame_mod = 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); enable = 1;
    wait (fstart);
    @(negedge clk); mod16 = 1;   // takes effect at the next frame
    wait (sym == 26);
    checks++; if (npil_sym != 6) begin failures++; $display("pilot symbols %0d", npil_sym); end
    checks++; if (car != 0) begin failures++; $display("partial symbol"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
