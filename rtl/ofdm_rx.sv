// ofdm_rx: the OFDM receiver, from a real IF signal back to bits.
//
//   rx_mixer_dds -> ddc (/4) -> beek_sync (arrival time + CFO)
//   -> data_forward (delay, frame-to-symbol FIFO, cfo_correct)
//   -> fft (N=1024) -> ls_chest -> zf_equalizer -> pilot_dc_removal
//   -> qam_demapper
// 'if_in' takes one real sample per clock. Decoded bits leave on
// 'bits_valid' with 'bits' (first bit in bit 0; 2 valid bits for QPSK, 4
// for 16-QAM) and 'bits_sym' (symbol number in the frame). 'mod16' must
// match the transmitter. The remaining outputs expose the synchroniser and
// the equalised constellation for observation.
//
// The chain and its order follow the reference design; the ports, the
// observation outputs and the modulation input are this implementation's.
module ofdm_rx
  import ofdm_pkg::*;
#(
  parameter int unsigned N     = 1024,
  parameter int unsigned CP    = 256,
  parameter int unsigned NSYMS = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 mod16,
  input  logic [31:0]          fcw,
  input  logic signed [DW-1:0] if_in,
  output logic                 bits_valid,
  output logic [3:0]           bits,
  output logic [3:0]           bits_sym,
  output cplx_t                eq_sym,
  output logic                 peak,
  output logic [AW-1:0]        cfo_angle,
  output logic                 frame_active,
  output logic                 fwd_holdoff,
  output logic                 fifo_overflow,
  output logic                 class_mismatch
);
  localparam int unsigned LG = $clog2(N);

  cplx_t mix, bb;
  logic  bb_v;
  rx_mixer_dds u_mix (.clk, .rst_n, .fcw, .if_in, .y(mix));
  ddc          u_ddc (.clk, .rst_n, .x(mix), .y_valid(bb_v), .y(bb));

  logic [31:0] metric, energy;
  beek_sync #(.N(N), .CP(CP)) u_sync (
    .clk, .rst_n, .in_valid(bb_v), .in_data(bb), .peak, .angle(cfo_angle),
    .metric_o(metric), .energy_o(energy));

  logic       fft_ready, fv;
  cplx_t      fd;
  logic [3:0] fsym;
  data_forward #(.N(N), .CP(CP), .NSYMS(NSYMS)) u_fwd (
    .clk, .rst_n, .in_valid(bb_v), .in_data(bb), .peak, .angle(cfo_angle),
    .fft_ready, .fft_valid(fv), .fft_data(fd), .fft_sym(fsym),
    .frame_active, .holdoff(fwd_holdoff), .overflow(fifo_overflow));

  logic          ov;
  logic [LG-1:0] oidx;
  cplx_t         od;
  fft #(.N(N), .INVERSE(1'b0), .SHIFT(1'b1)) u_fft (
    .clk, .rst_n, .ready(fft_ready), .in_valid(fv), .in_data(fd),
    .out_valid(ov), .out_idx(oidx), .out_data(od));

  logic          cv, ce_busy;
  logic [LG-1:0] cidx;
  car_kind_e     ckind;
  logic [3:0]    csym;
  cplx_t         cy, ch;
  ls_chest #(.N(N)) u_che (
    .clk, .rst_n, .in_valid(ov), .in_idx(oidx), .in_data(od), .in_sym(fsym),
    .out_valid(cv), .out_idx(cidx), .out_kind(ckind), .out_sym(csym),
    .out_y(cy), .out_h(ch), .busy(ce_busy));

  logic          ev;
  logic [LG-1:0] eidx;
  car_kind_e     ekind;
  logic [3:0]    esym;
  cplx_t         ex;
  zf_equalizer #(.N(N)) u_eq (
    .clk, .rst_n, .in_valid(cv), .in_idx(cidx), .in_kind(ckind), .in_sym(csym),
    .in_y(cy), .in_h(ch), .out_valid(ev), .out_idx(eidx), .out_kind(ekind),
    .out_sym(esym), .out_x(ex));

  logic  dv;
  cplx_t dx;
  pilot_dc_removal #(.N(N)) u_rm (
    .clk, .rst_n, .in_valid(ev), .in_idx(eidx), .in_kind(ekind), .in_sym(esym),
    .in_x(ex), .out_valid(dv), .out_sym(bits_sym), .out_x(dx), .mismatch(class_mismatch));

  qam_demapper u_dem (.mod16, .sym(dx), .bits);
  assign bits_valid = dv;
  assign eq_sym     = dx;
endmodule
