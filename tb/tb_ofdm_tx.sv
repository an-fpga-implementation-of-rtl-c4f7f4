// tb_ofdm_tx: transmitter at full size. Sends one QPSK frame and one 16-QAM
// frame and captures the baseband stream before the up-converter, one sample
// every four clocks from each symbol-start mark. For each captured symbol:
//  - the 256-sample cyclic prefix equals the last 256 samples (exactly);
//  - symbols follow each other every (N+CP)*4 = 5120 clocks, frames every
//    13 symbols;
//  - a DFT of the useful part (computed here in real arithmetic, divided by
//    N/32 to undo the transform scaling) gives the carriers, logical carrier
//    c at bin c XOR 512: guards and DC stay below 64; the training symbol
//    carries the Zadoff-Chu sequence (root 25, length 607, amplitude 2896)
//    within 64; in data symbols 0, 4, 8 every 6th loaded carrier is a pilot
//    whose signs follow an independent PRBS-9 model; the data carriers decode
//    to an independent PRBS-23 model of the source bits.
// The IF output must be active and never reach full scale.
//
// Frame layout, prefix and ZC training symbol are the reference design's; ZC
// root and length, pilot values and amplitudes are this design's own.
`timescale 1ns/1ps
module tb_ofdm_tx;
  import ofdm_pkg::*;
  localparam int N = 1024, CP = 256, G = 208, NSYM = 13;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  logic en = 0, m16 = 0, sst, fst;
  logic signed [DW-1:0] ifo;
  cplx_t bb;
  ofdm_tx dut (.clk, .rst_n, .enable(en), .mod16(m16), .fcw(FCW_IF), .if_out(ifo), .bb_out(bb),
    .bb_sym_start(sst), .frame_start(fst));

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction

  real ct [N], st [N];
  initial for (int i = 0; i < N; i++) begin ct[i] = $cos(2.0 * PI * i / N); st[i] = $sin(2.0 * PI * i / N); end

  // independent source model: b[n] = b[n-23] ^ b[n-18], first 23 bits ones
  bit hist [$];
  function automatic bit src_next();
    bit b = hist.size() < 23 ? 1'b1 : hist[hist.size() - 23] ^ hist[hist.size() - 18];
    hist.push_back(b);
    if (hist.size() > 64) void'(hist.pop_front());
    return b;
  endfunction
  logic pb [2000];
  initial for (int n = 0; n < 2000; n++) pb[n] = n < 9 ? 1'b1 : pb[n-9] ^ pb[n-5];

  int bad = 0;
  task automatic err(input string s);
    failures++;
    if (bad++ < 10) $display("%s", s);
  endtask

  // check one captured symbol; k = 0 training symbol, 1..12 data symbols 0..11
  task automatic check_symbol(input cplx_t s [N + CP], input int k, input logic q16);
    real xr [N], xi [N];
    int np = 0, ndat = 0, nerr = 0;
    for (int n = 0; n < CP; n++) begin
      checks++;
      if (s[n] != s[n + N]) begin err($sformatf("sym %0d: CP sample %0d differs", k, n)); break; end
    end
    for (int b = 0; b < N; b++) begin
      automatic real a_re = 0.0, a_im = 0.0;
      for (int n = 0; n < N; n++) begin
        automatic int p = (b * n) % N;
        a_re += real'(s[CP + n].re) * ct[p] + real'(s[CP + n].im) * st[p];
        a_im += real'(s[CP + n].im) * ct[p] - real'(s[CP + n].re) * st[p];
      end
      xr[b] = a_re * 32.0 / N; xi[b] = a_im * 32.0 / N;
    end
    for (int c = 0; c < N; c++) begin
      automatic int b = c ^ 512;
      automatic int u = (c < G || c >= N - G || c == N / 2) ? -1 : (c > N / 2 ? c - G - 1 : c - G);
      if (u < 0) begin
        checks++;
        if (fabs(xr[b]) > 64.0 || fabs(xi[b]) > 64.0) err($sformatf("sym %0d: null carrier %0d = %0.1f,%0.1f", k, c, xr[b], xi[b]));
      end else if (k == 0) begin
        automatic real ph = -PI * 25.0 * real'(u) * real'(u + 1) / 607.0;
        checks++;
        if (fabs(xr[b] - 2896.0 * $cos(ph)) > 64.0 || fabs(xi[b] - 2896.0 * $sin(ph)) > 64.0)
          err($sformatf("ZC carrier %0d = %0.1f,%0.1f", u, xr[b], xi[b]));
      end else if ((k - 1) % 4 == 0 && u % 6 == 0) begin
        automatic real er = pb[2*np] ? -2048.0 : 2048.0, ei = pb[2*np+1] ? -2048.0 : 2048.0;
        np++;
        checks++;
        if (fabs(xr[b] - er) > 64.0 || fabs(xi[b] - ei) > 64.0)
          err($sformatf("sym %0d pilot %0d = %0.1f,%0.1f", k, np - 1, xr[b], xi[b]));
      end else begin
        automatic bit b0 = src_next(), b1 = src_next(), b2 = q16 ? src_next() : 1'b0, b3 = q16 ? src_next() : 1'b0;
        automatic real a_re = q16 ? (b2 ? 3072.0 : 1024.0) : 2048.0, a_im = a_re;
        if (q16) a_im = b3 ? 3072.0 : 1024.0;
        ndat++;
        checks++;
        if (fabs(xr[b] - (b0 ? -a_re : a_re)) > 64.0 || fabs(xi[b] - (b1 ? -a_im : a_im)) > 64.0) begin
          nerr++;
          err($sformatf("sym %0d data carrier %0d = %0.1f,%0.1f", k, u, xr[b], xi[b]));
        end
      end
    end
    if (k > 0) begin
      checks++;
      if (ndat != ((k - 1) % 4 == 0 ? 505 : 607)) err($sformatf("sym %0d: %0d data carriers", k, ndat));
    end
    $display("symbol %0d (%s) checked: %0d data carriers, %0d errors", k, q16 ? "16QAM" : "QPSK", ndat, nerr);
  endtask

  int cyc = 0, t_prev = -1, nsym = 0, if_active = 0, if_full = 0;
  always @(posedge clk) begin
    cyc++;
    if (fst && en) m16 <= 1'b1;   // the mode is latched per frame: second frame 16-QAM
    if (ifo != 0) if_active++;
    if (ifo == 16'sh7fff || ifo == -16'sh8000 || ifo == -16'sh7fff) if_full++;
  end

  initial begin
    cplx_t s [N + CP];
    logic sst_d = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    en = 1;
    for (int f = 0; f < 2; f++) begin
      for (int k = 0; k < NSYM; k++) begin
        // wait for the rising edge of the symbol-start mark
        do begin sst_d = sst; @(posedge clk); #1; end while (!(sst && !sst_d));
        if (t_prev >= 0) begin
          checks++;
          if (cyc - t_prev != (N + CP) * 4) err($sformatf("symbol period %0d clocks", cyc - t_prev));
        end
        t_prev = cyc;
        for (int n = 0; n < N + CP; n++) begin
          s[n] = bb;
          if (n < N + CP - 1) repeat (4) @(posedge clk);
          #1;
        end
        check_symbol(s, k, f == 1);
        sst_d = 1;
      end
    end
    checks++;
    if (if_active < 100000 || if_full != 0) err($sformatf("IF activity %0d, full-scale samples %0d", if_active, if_full));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
