// tx_frame_assembly: builds each OFDM symbol in the frequency domain and
// feeds it to the IFFT.
//
// A frame is a Zadoff-Chu training symbol followed by NSYM (12) symbols; the
// 1st, 5th and 9th of those carry pilots. For every symbol the block walks the
// 1024 logical carriers in order, one per clock, and chooses:
//   guard band (208 carriers at each edge) and DC: zero;
//   training symbol, loaded carrier: next Zadoff-Chu element;
//   pilot symbol, every 6th loaded carrier (both band edges included): a
//     QPSK pilot of amplitude A_PILOT, signs from the pilot PRBS;
//   otherwise: the next 2 (QPSK) or 4 (16-QAM) source bits, mapped.
// The frame layout is the reference design's; the pilot values, the ZC
// length/root and back-to-back frames are this implementation's choices.
//
// A symbol starts when 'enable' is high, the IFFT is 'fft_ready' and the CP
// buffer has 'space'. Carrier values reach 'fft_valid'/'fft_data' ZC_LAT
// clocks after their carrier is chosen (the Zadoff-Chu generator's latency;
// the other values are delayed to match). 'mod16' is sampled at the start
// of each frame. 'sym_idx' is 0 for the training symbol and 1..12 after it.
module tx_frame_assembly
  import ofdm_pkg::*;
#(
  parameter int unsigned N     = 1024,
  parameter int unsigned NSYMS = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       mod16,
  input  logic       fft_ready,
  input  logic       space,
  output logic       fft_valid,
  output cplx_t      fft_data,
  output logic [3:0] sym_idx,
  output logic       frame_start
);
  localparam int unsigned LG  = $clog2(N);
  localparam int unsigned LAT = 18;   // zc_gen latency

  logic          busy, mod16_f;
  logic [LG-1:0] c;
  logic [3:0]    sidx;
  logic          start;
  logic          pend;   // symbol sent, waiting for the IFFT to leave LOAD

  assign start   = !busy && !pend && enable && fft_ready && space;
  assign sym_idx = sidx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; c <= '0; sidx <= '0; mod16_f <= 1'b0; frame_start <= 1'b0; pend <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      if (pend && !fft_ready) pend <= 1'b0;
      if (start) begin
        busy <= 1'b1; c <= '0;
        if (sidx == 4'd0) begin mod16_f <= mod16; frame_start <= 1'b1; end
      end else if (busy) begin
        c <= c + 1'b1;
        if (c == LG'(N - 1)) begin
          busy <= 1'b0;
          pend <= 1'b1;
          sidx <= (sidx == 4'(NSYMS)) ? 4'd0 : sidx + 1'b1;
        end
      end
    end
  end

  // classify the current carrier
  logic      zc_sym, pilot_sym;
  car_kind_e kind;
  assign zc_sym    = (sidx == 4'd0);
  assign pilot_sym = !zc_sym && (((sidx - 4'd1) % 4'(PPERIOD)) == 4'd0);
  assign kind      = carrier_kind(c, pilot_sym);

  logic take_data, take_pilot, take_zc;
  assign take_data  = busy && !zc_sym && kind == CAR_DATA;
  assign take_pilot = busy && kind == CAR_PILOT;
  assign take_zc    = busy && zc_sym && kind != CAR_NULL;

  // data source and mapper
  logic [3:0] bits;
  cplx_t      dsym;
  prbs_source u_src (.clk, .rst_n, .restart(1'b0), .req(take_data),
                     .nbits(mod16_f ? 3'd4 : 3'd2), .bits(bits));
  qam_mapper  u_map (.mod16(mod16_f), .bits(bits), .sym(dsym));

  // pilots
  logic [8:0] pr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   pr <= '1;
    else if (start)               pr <= '1;
    else if (take_pilot)          pr <= pilot_prbs_step(pilot_prbs_step(pr));
  end
  cplx_t psym;
  assign psym.re = pr[8]                  ? DW'(-A_PILOT) : DW'(A_PILOT);
  assign psym.im = pilot_prbs_step(pr)[8] ? DW'(-A_PILOT) : DW'(A_PILOT);

  // Zadoff-Chu
  logic  zc_v;
  cplx_t zc;
  zc_gen u_zc (.clk, .rst_n, .restart(start), .next(take_zc), .zc_valid(zc_v), .zc(zc));

  // align data/pilot/zero values with the ZC latency
  cplx_t val_dl [LAT];
  logic  vld_dl [LAT];
  logic  zc_dl  [LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin val_dl[i] <= '0; vld_dl[i] <= 1'b0; zc_dl[i] <= 1'b0; end
    end else begin
      val_dl[0] <= take_data ? dsym : take_pilot ? psym : '0;
      vld_dl[0] <= busy;
      zc_dl[0]  <= take_zc;
      for (int i = 1; i < LAT; i++) begin
        val_dl[i] <= val_dl[i-1]; vld_dl[i] <= vld_dl[i-1]; zc_dl[i] <= zc_dl[i-1];
      end
    end
  end
  assign fft_valid = vld_dl[LAT-1];
  assign fft_data  = zc_dl[LAT-1] ? zc : val_dl[LAT-1];
endmodule
