// tb_ofdm_transceiver: end-to-end test of the transceiver at its full size.
//
// The transmit IF is looped back to the receive IF through a channel of a
// few clocks of delay, a gain of 7/8 and small uniform noise. The receive
// oscillator is 6 kHz off the transmit one (eps = 0.4 subcarrier), so the
// receiver must estimate and remove a carrier frequency offset. The first
// frame is QPSK; from the second frame on the transmitter switches to
// 16-QAM and the receiver follows once it has delivered a whole QPSK frame.
// Received bits are compared with an independent model of the PRBS-23
// source. Each frame detection must carry a CFO estimate within 0.02
// subcarrier of the applied offset and come 66560 clocks (one frame) after
// the previous one, within one sample. Counted mechanisms: frame detections (peaks), CFO angles that are
// not zero, pilot symbols, hold symbols, QPSK and 16-QAM frames, and the
// absence of FIFO overflow and classification mismatch.
//
// The 6 kHz offset, 15 MHz IF and 61.44 MHz clock are the reference design's
// test conditions; the channel delay, gain and noise are this testbench's own.
`timescale 1ns/1ps
module tb_ofdm_transceiver;
  import ofdm_pkg::*;

  localparam int NFRAMES_RX   = 3;
  localparam int DATA_PER_FRM = 9 * 607 + 3 * 505;   // data carriers per frame
  localparam logic [31:0] CFO_FCW = 32'd419430;      // 6 kHz at 61.44 MHz

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic tx_enable = 0, tx_mod16 = 0, rx_mod16 = 0;
  logic signed [DW-1:0] tx_if, rx_if;
  logic rx_holdoff, tx_frame_start, rx_bits_valid, rx_peak, rx_frame_active, rx_fifo_overflow, rx_class_mismatch;
  logic [3:0] rx_bits, rx_bits_sym;
  cplx_t rx_eq_sym;
  logic [AW-1:0] rx_cfo_angle;

  ofdm_transceiver dut (
    .clk, .rst_n, .tx_enable, .tx_mod16, .tx_fcw(FCW_IF), .tx_if, .tx_frame_start,
    .rx_mod16, .rx_fcw(FCW_IF + CFO_FCW), .rx_if, .rx_bits_valid, .rx_bits, .rx_bits_sym,
    .rx_eq_sym, .rx_peak, .rx_cfo_angle, .rx_frame_active, .rx_holdoff, .rx_fifo_overflow,
    .rx_class_mismatch);

  // channel: delay, gain 7/8, noise
  localparam int CH_DELAY = 13;
  logic signed [DW-1:0] ch [CH_DELAY];
  always_ff @(posedge clk) begin
    ch[0] <= tx_if;
    for (int i = 1; i < CH_DELAY; i++) ch[i] <= ch[i-1];
  end
  always_comb begin
    automatic int v = (int'(ch[CH_DELAY-1]) * 7) / 8;
    rx_if = DW'(v) + noise;
  end
  logic signed [DW-1:0] noise;
  always_ff @(posedge clk) noise <= DW'($signed($urandom_range(0, 32)) - 16);

  int checks = 0, failures = 0;
  int n_holdoff = 0, n_peaks = 0, n_cfo = 0, n_pilot_syms = 0, n_hold_syms = 0, n_frames_q = 0, n_frames_16 = 0;
  int bit_err_q = 0, bits_q = 0, bit_err_16 = 0, bits_16 = 0;
  int rx_syms = 0, rx_frames = 0;
  int cyc = 0;
  int first_peak_cyc = -1, first_bits_cyc = -1, last_frame_peak = -1;

  // independent reference of the transmit bit stream: b[n] = b[n-23] ^ b[n-18]
  bit ref_hist [$];
  function automatic bit ref_next();
    bit b;
    if (ref_hist.size() < 23) begin
      b = 1'b1;            // all-ones seed: the first 23 bits are ones
    end else begin
      b = ref_hist[ref_hist.size() - 23] ^ ref_hist[ref_hist.size() - 18];
    end
    ref_hist.push_back(b);
    if (ref_hist.size() > 64) void'(ref_hist.pop_front());
    return b;
  endfunction

  // watchdog
  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("watchdog: rx frames %0d symbols %0d", rx_frames, rx_syms);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] last_sym = 4'hF;
  logic cur_mod;
  always @(posedge clk) begin
    cyc++;
    if (tx_frame_start && tx_enable) tx_mod16 <= 1'b1;   // frames after the first: 16-QAM
    if (rst_n && rx_peak && rx_holdoff) n_holdoff++;
    if (rst_n && rx_peak) begin
      n_peaks++;
      if (first_peak_cyc < 0) first_peak_cyc = cyc;
      if (rx_cfo_angle != '0) n_cfo++;
      if (!rx_frame_active && !rx_holdoff) begin
        // a frame detection: the offset estimate must match the 6 kHz
        // (eps = -0.4 subcarrier as seen by the receiver) and frames must
        // be found (N+CP)*13*4 = 66560 clocks apart, within one sample
        automatic real eps = -real'($signed(rx_cfo_angle)) / 16777216.0;
        $display("frame peak at cycle %0d angle %0d (eps %f)", cyc, $signed(rx_cfo_angle), eps);
        checks++;
        if (eps > -0.38 || eps < -0.42) begin failures++; $display("CFO estimate eps %f, expected -0.4", eps); end
        if (last_frame_peak >= 0) begin
          checks++;
          if (cyc - last_frame_peak > 66564 || cyc - last_frame_peak < 66556) begin
            failures++; $display("frame peaks %0d clocks apart", cyc - last_frame_peak);
          end
        end
        last_frame_peak = cyc;
      end
    end
    if (rst_n && rx_fifo_overflow) begin failures++; $display("FIFO overflow"); end
    if (rst_n && rx_class_mismatch) begin failures++; $display("carrier class mismatch"); end
    if (rst_n && rx_bits_valid) begin
      automatic int nb = rx_mod16 ? 4 : 2;
      if (first_bits_cyc < 0) first_bits_cyc = cyc;
      if (rx_bits_sym != last_sym) begin
        last_sym = rx_bits_sym;
        if (rx_bits_sym % 4 == 0) n_pilot_syms++; else n_hold_syms++;
      end
      for (int i = 0; i < nb; i++) begin
        automatic bit e = ref_next();

        if (rx_mod16) begin bits_16++; if (rx_bits[i] != e) bit_err_16++; end
        else          begin bits_q++;  if (rx_bits[i] != e) bit_err_q++;  end
      end
      rx_syms++;
      if (rx_syms == DATA_PER_FRM) begin
        rx_syms = 0;
        rx_frames++;
        if (rx_mod16) n_frames_16++; else n_frames_q++;
        $display("frame %0d done at cycle %0d: QPSK bits %0d err %0d, 16QAM bits %0d err %0d",
                 rx_frames, cyc, bits_q, bit_err_q, bits_16, bit_err_16);
        rx_mod16 <= 1'b1;
      end
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);   // silence before the first frame
    tx_enable = 1;
    wait (rx_frames == NFRAMES_RX);
    repeat (10) @(posedge clk);
    checks++; if (n_peaks < NFRAMES_RX)   begin failures++; $display("too few peaks %0d", n_peaks); end
    checks++; if (n_holdoff == 0)         begin failures++; $display("hold-off never used"); end
    checks++; if (n_cfo == 0)             begin failures++; $display("no CFO estimate"); end
    checks++; if (n_pilot_syms == 0)      begin failures++; $display("no pilot symbol"); end
    checks++; if (n_hold_syms == 0)       begin failures++; $display("no hold symbol"); end
    checks++; if (n_frames_q == 0)        begin failures++; $display("no QPSK frame"); end
    checks++; if (n_frames_16 == 0)       begin failures++; $display("no 16-QAM frame"); end
    checks++; if (bit_err_q != 0)         begin failures++; $display("QPSK bit errors %0d", bit_err_q); end
    checks++; if (bit_err_16 * 1000 > bits_16) begin failures++; $display("16-QAM BER too high %0d/%0d", bit_err_16, bits_16); end
    $display("peaks %0d cfo %0d pilot syms %0d hold syms %0d QPSK frames %0d 16QAM frames %0d",
             n_peaks, n_cfo, n_pilot_syms, n_hold_syms, n_frames_q, n_frames_16);
    $display("bits QPSK %0d err %0d, 16-QAM %0d err %0d", bits_q, bit_err_q, bits_16, bit_err_16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
