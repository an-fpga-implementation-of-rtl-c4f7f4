// tb_ofdm_rx: receiver at full size, fed by the transmitter through a
// two-path IF channel (3/4 of the signal after 5 clocks plus 1/4 after 23
// clocks, a frequency-selective echo well inside the cyclic prefix) with
// small noise and no frequency offset. The first frame is QPSK, the rest
// 16-QAM. Checks: the decoded bits equal an independent PRBS-23 model of
// the source with no error; every equalised data carrier lies within 512
// (a quarter of the QPSK amplitude, half a 16-QAM decision distance) of
// its ideal constellation point; one frame detection per frame;
// consecutive frames finish exactly 13*(N+CP)*4 = 66560 clocks apart (the
// receiver keeps up with the frame rate, within one sample of detection
// jitter); no FIFO overflow or carrier-class mismatch.
//
// The frame and receiver chain are the reference design's; the echo channel
// is this testbench's own.
`timescale 1ns/1ps
module tb_ofdm_rx;
  import ofdm_pkg::*;
  localparam int NFR = 3;
  localparam int DATA_PER_FRM = 9 * 607 + 3 * 505;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  logic en = 0, m16 = 0, rm16 = 0, fst;
  logic signed [DW-1:0] ifo, rif;
  cplx_t bb;
  logic sst;
  ofdm_tx u_tx (.clk, .rst_n, .enable(en), .mod16(m16), .fcw(FCW_IF), .if_out(ifo), .bb_out(bb),
    .bb_sym_start(sst), .frame_start(fst));

  logic bv, pk, fa, ho, ovf, mm;
  logic [3:0] bits, bsym;
  cplx_t eq;
  logic [AW-1:0] ang;
  ofdm_rx dut (.clk, .rst_n, .mod16(rm16), .fcw(FCW_IF), .if_in(rif), .bits_valid(bv), .bits,
    .bits_sym(bsym), .eq_sym(eq), .peak(pk), .cfo_angle(ang), .frame_active(fa),
    .fwd_holdoff(ho), .fifo_overflow(ovf), .class_mismatch(mm));

  // channel
  logic signed [DW-1:0] dl [24];
  always_ff @(posedge clk) begin
    dl[0] <= ifo;
    for (int i = 1; i < 24; i++) dl[i] <= dl[i-1];
  end
  logic signed [DW-1:0] nz;
  always_ff @(posedge clk) nz <= DW'($signed($urandom_range(0, 16)) - 8);
  assign rif = DW'((int'(dl[4]) * 3) / 4 + int'(dl[22]) / 4) + nz;

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit hist [$];
  function automatic bit src_next();
    bit b = hist.size() < 23 ? 1'b1 : hist[hist.size() - 23] ^ hist[hist.size() - 18];
    hist.push_back(b);
    if (hist.size() > 64) void'(hist.pop_front());
    return b;
  endfunction
  function automatic int iabs(input int v); return v < 0 ? -v : v; endfunction

  int cyc = 0, nframes = 0, ncar = 0, bit_err = 0, nbits = 0, evm_bad = 0, frame_peaks = 0, t_done = -1, bad = 0;
  int max_dev = 0;
  always @(posedge clk) begin
    cyc++;
    if (fst && en) m16 <= 1'b1;
    if (rst_n && pk && !fa && !ho) frame_peaks++;
    if (rst_n && (ovf || mm)) begin failures++; if (bad++ < 5) $display("overflow %0d mismatch %0d", ovf, mm); end
    if (rst_n && bv) begin
      automatic int nb = rm16 ? 4 : 2;
      automatic int a  = rm16 ? 1024 : 2048;
      automatic bit e [4];
      automatic int ir, ii, dev;
      for (int i = 0; i < nb; i++) begin
        e[i] = src_next();
        nbits++;
        if (bits[i] != e[i]) bit_err++;
      end
      ir = rm16 ? (e[2] ? 3 * a : a) : a;
      ii = rm16 ? (e[3] ? 3 * a : a) : a;
      if (e[0]) ir = -ir;
      if (e[1]) ii = -ii;
      dev = iabs(int'(eq.re) - ir) > iabs(int'(eq.im) - ii) ? iabs(int'(eq.re) - ir) : iabs(int'(eq.im) - ii);
      if (dev > max_dev) max_dev = dev;
      if (dev > 512) evm_bad++;
      ncar++;
      if (ncar == DATA_PER_FRM) begin
        ncar = 0;
        nframes++;
        $display("frame %0d (%s) done at cycle %0d, bit errors so far %0d, max deviation %0d",
                 nframes, rm16 ? "16QAM" : "QPSK", cyc, bit_err, max_dev);
        if (t_done >= 0) begin
          checks++;
          if (iabs(cyc - t_done - 66560) > 4) begin failures++; $display("frame spacing %0d clocks", cyc - t_done); end
        end
        t_done = cyc;
        rm16 <= 1'b1;
      end
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    en = 1;
    wait (nframes == NFR);
    repeat (10) @(posedge clk);
    checks++; if (bit_err != 0)         begin failures++; $display("%0d bit errors in %0d bits", bit_err, nbits); end
    checks++; if (evm_bad != 0)         begin failures++; $display("%0d carriers off their constellation point", evm_bad); end
    checks++; if (frame_peaks != NFR && frame_peaks != NFR + 1) begin failures++; $display("%0d frame detections", frame_peaks); end
    checks++; if (nbits != DATA_PER_FRM * 2 + (NFR - 1) * DATA_PER_FRM * 4) begin failures++; $display("%0d bits", nbits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
