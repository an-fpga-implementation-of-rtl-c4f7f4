// ofdm_tx: the OFDM transmitter, from random bits to a real IF signal.
//
//   prbs_source -> qam_mapper -> tx_frame_assembly (ZC, pilots, DC, guards)
//   -> fft (inverse, N=1024) -> cp_insert (CP=256, frames) -> duc (x4)
//   -> tx_mixer_dds (IF)
// One clock (61.44 MHz in the reference design) drives everything; the
// baseband runs at one sample every OSR=4 clocks (15.36 MS/s), strobed by a
// free-running phase counter. 'if_out' carries one real sample per clock.
// 'bb_out' is the baseband sample stream before the up-converter
// (observation), 'bb_sym_start' marks the first CP sample of each symbol
// there and 'frame_start' pulses when a frame's training symbol is built.
module ofdm_tx
  import ofdm_pkg::*;
#(
  parameter int unsigned N     = 1024,
  parameter int unsigned CP    = 256,
  parameter int unsigned NSYMS = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic                 mod16,
  input  logic [31:0]          fcw,
  output logic signed [DW-1:0] if_out,
  output cplx_t                bb_out,
  output logic                 bb_sym_start,
  output logic                 frame_start
);
  localparam int unsigned LG = $clog2(N);

  logic [1:0] phase;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + 1'b1;
  end

  logic          ifft_ready, space, fv, ov;
  cplx_t         fd, od;
  logic [LG-1:0] oidx;
  logic [3:0]    sidx;

  tx_frame_assembly #(.N(N), .NSYMS(NSYMS)) u_asm (
    .clk, .rst_n, .enable, .mod16, .fft_ready(ifft_ready), .space,
    .fft_valid(fv), .fft_data(fd), .sym_idx(sidx), .frame_start);

  fft #(.N(N), .INVERSE(1'b1), .SHIFT(1'b1)) u_ifft (
    .clk, .rst_n, .ready(ifft_ready), .in_valid(fv), .in_data(fd),
    .out_valid(ov), .out_idx(oidx), .out_data(od));

  cp_insert #(.N(N), .CP(CP)) u_cp (
    .clk, .rst_n, .in_valid(ov), .in_idx(oidx), .in_data(od), .space,
    .bb_en(phase == 2'd3), .out_data(bb_out), .sym_start(bb_sym_start));

  cplx_t up;
  duc u_duc (.clk, .rst_n, .phase, .x(bb_out), .y(up));

  tx_mixer_dds u_mix (.clk, .rst_n, .fcw, .x(up), .if_out);
endmodule
