// ofdm_transceiver: top level, the OFDM transmitter and receiver of an
// LTE-like link (1024 subcarriers, 256-sample cyclic prefix, 12-symbol
// frames with a Zadoff-Chu training symbol, QPSK or 16-QAM, 15 MHz IF at a
// 61.44 MHz clock).
//
// The two paths stand side by side: 'tx_if' is the transmit IF sample for
// a DAC, 'rx_if' the received IF sample from an ADC (the converters are
// outside this design); connecting one to the other, possibly through a
// channel model, closes the link. Each path has its own IF oscillator word,
// so a difference between 'tx_fcw' and 'rx_fcw' is a carrier frequency
// offset the receiver has to estimate and remove. Both paths share one
// clock.
//
// The transmitter and receiver follow the reference design's block diagram;
// the converters sit outside, so the IF samples are ports. The port set is
// this implementation's.
module ofdm_transceiver
  import ofdm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // transmitter
  input  logic                 tx_enable,
  input  logic                 tx_mod16,
  input  logic [31:0]          tx_fcw,
  output logic signed [DW-1:0] tx_if,
  output logic                 tx_frame_start,
  // receiver
  input  logic                 rx_mod16,
  input  logic [31:0]          rx_fcw,
  input  logic signed [DW-1:0] rx_if,
  output logic                 rx_bits_valid,
  output logic [3:0]           rx_bits,
  output logic [3:0]           rx_bits_sym,
  output cplx_t                rx_eq_sym,
  output logic                 rx_peak,
  output logic [AW-1:0]        rx_cfo_angle,
  output logic                 rx_frame_active,
  output logic                 rx_holdoff,
  output logic                 rx_fifo_overflow,
  output logic                 rx_class_mismatch
);
  cplx_t tx_bb;
  logic  tx_sym_start;

  ofdm_tx u_tx (
    .clk, .rst_n, .enable(tx_enable), .mod16(tx_mod16), .fcw(tx_fcw),
    .if_out(tx_if), .bb_out(tx_bb), .bb_sym_start(tx_sym_start),
    .frame_start(tx_frame_start));

  ofdm_rx u_rx (
    .clk, .rst_n, .mod16(rx_mod16), .fcw(rx_fcw), .if_in(rx_if),
    .bits_valid(rx_bits_valid), .bits(rx_bits), .bits_sym(rx_bits_sym),
    .eq_sym(rx_eq_sym), .peak(rx_peak), .cfo_angle(rx_cfo_angle),
    .frame_active(rx_frame_active), .fwd_holdoff(rx_holdoff), .fifo_overflow(rx_fifo_overflow),
    .class_mismatch(rx_class_mismatch));
endmodule
