// tb_data_forward: drives the forwarder with a baseband stream (one sample
// every four clocks) whose sample values encode their own index
// (re = 4*(index mod 4096), im = -re) and zero CFO angle, and pulses 'peak'
// where the synchroniser would flag a window ending on sample t (after
// sample t+5). Checks, for two frames: each of the NSYMS symbols reaches
// the FFT side as one burst of N samples on N consecutive clocks, numbered
// 0..NSYMS-1, and holds exactly samples t+1+CP-PEAK_SHIFT + s*(N+CP) + n;
// peaks during the frame and the hold-off are ignored; frame_active and
// holdoff are raised; the FIFO never overflows; and the first burst starts
// LATB = 41 clocks after its last sample arrived (20 clocks of delay
// line, 18 of CORDIC, 3 of FIFO).
`timescale 1ns/1ps
module tb_data_forward;
  import ofdm_pkg::*;
  localparam int N = 1024, CP = 256, NS = 12, PS = 3;
  localparam int LATB = 41;   // delay line 5 samples (20 clocks), CORDIC 18, FIFO write and read 3
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv = 0, pk = 0, fv, fa, ho, ovf;
  cplx_t din = '0, fd;
  logic [3:0] fs;
  data_forward dut (.clk, .rst_n, .in_valid(iv), .in_data(din), .peak(pk), .angle('0),
    .fft_ready(1'b1), .fft_valid(fv), .fft_data(fd), .fft_sym(fs),
    .frame_active(fa), .holdoff(ho), .overflow(ovf));

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected frame starts (first forwarded sample index) in order
  int fstart [$];
  int cur = -1, nb = 0, pos = 0, bursts = 0, seen_active = 0, seen_hold = 0, bad = 0;
  int last_wr = 0, cyc = 0, last_idx = -1;
  logic fv_d = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    #1;
    if (fa) seen_active++;
    if (ho) seen_hold++;
    if (fv) begin
      if (!fv_d) begin
        // burst start
        if (nb == 0) begin
          cur = fstart.pop_front();
          checks++;
          if (cyc - last_wr != LATB) begin
            failures++; $display("first burst %0d clocks after its last input sample", cyc - last_wr);
          end
        end
        checks++;
        if (fs != 4'(nb)) begin failures++; $display("burst %0d numbered %0d", nb, fs); end
        pos = 0;
      end
      begin
        automatic int idx = cur + nb * (N + CP) + pos;
        automatic int e = 4 * (idx % 4096);
        if (e > 32767) e -= 65536;
        if ((int'(fd.re) - e > 1 || e - int'(fd.re) > 1) && bad < 5) begin
          bad++; $display("sym %0d sample %0d: got %0d exp %0d (index %0d)", nb, pos, fd.re, e, idx);
        end
        if (int'(fd.re) - e > 1 || e - int'(fd.re) > 1) failures++;
        checks++;
      end
      pos++;
    end else if (fv_d) begin
      checks++;
      if (pos != N) begin failures++; $display("burst of %0d samples", pos); end
      bursts++;
      nb = (nb == NS - 1) ? 0 : nb + 1;
    end
    fv_d = fv;
  end

  int nin = 0;
  task automatic send();
    @(negedge clk);
    iv = 1;
    if (nin == last_idx) last_wr = cyc;
    din.re = 16'(4 * (nin % 4096)); din.im = -din.re;
    @(negedge clk); iv = 0;
    nin++;
    repeat (2) @(negedge clk);
  endtask

  task automatic pulse_peak();
    @(negedge clk); pk = 1; @(negedge clk); pk = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (500) send();
    for (int f = 0; f < 2; f++) begin
      automatic int t = nin - 1;           // window ends on sample t
      repeat (5) send();                    // peak flagged after sample t+5
      pulse_peak();
      fstart.push_back(t + 1 + CP - PS);
      last_idx = t + CP - PS + N;          // last sample of data symbol 0
      // a spurious peak during the frame and one during the hold-off
      repeat (3000) send();
      pulse_peak();
      while (!ho) send();
      send(); pulse_peak();
      while (ho) send();
      repeat (700) send();
    end
    repeat (6000) @(negedge clk);
    checks++;
    if (bursts != 2 * NS) begin failures++; $display("%0d bursts", bursts); end
    checks++;
    if (seen_active == 0 || seen_hold == 0) begin failures++; $display("frame_active/holdoff never raised"); end
    checks++;
    if (ovf) begin failures++; $display("FIFO overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
