// ls_chest: least-squares channel estimation with linear interpolation in
// frequency and hold in time.
//
// Input: the FFT output of one symbol, carriers in logical order, with the
// symbol's number in the frame ('in_sym', 0..NSYMS-1). The symbol is stored.
// In pilot symbols (numbers 0, 4, 8) each pilot carrier gives the LS
// estimate h_p = y * conj(s_p) / |s_p|^2 (eq. 3). With QPSK pilots of
// amplitude A_PILOT this is y * conj(sign(s_p)) / 2, a channel estimate in
// units of A_PILOT (h = 1 reads as 2048): the inversion is a shift.
// After a pilot symbol the 102 pilot estimates are joined by straight lines:
// loaded carrier u, between pilots i = u/6 and i+1, gets
//   h(u) = h_i + (h_{i+1} - h_i) * (u mod 6) / 6,
// written to the channel-response memory (607 clocks). The memory is kept
// for the symbols that follow until the next pilot symbol (zero-order hold in
// time). Then the stored symbol is replayed, one carrier per clock, with its
// channel value, carrier number and carrier kind ('out_*'); null carriers
// get h = 0.
//
// The pilot grid, LS estimator, linear interpolation and hold follow the
// reference design; pilot values and fixed-point formats are this
// implementation's. A new symbol must not start before the replay of the
// previous one has ended (the FFT schedule guarantees it; an assertion checks).
// That assertion uses rst_n in its 'disable iff', a synchronous use of the
// asynchronous reset; lint tools note the mix (SYNCASYNCNET), which is
// harmless because the assertion builds no logic.
module ls_chest
  import ofdm_pkg::*;
#(
  parameter int unsigned N = 1024
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [$clog2(N)-1:0] in_idx,
  input  cplx_t                in_data,
  input  logic [3:0]           in_sym,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_idx,
  output car_kind_e            out_kind,
  output logic [3:0]           out_sym,
  output cplx_t                out_y,
  output cplx_t                out_h,
  output logic                 busy
);
  localparam int unsigned LG   = $clog2(N);
  localparam int unsigned NUSE = N - 2 * GUARD - 1;          // 607
  localparam int unsigned NPIL = (NUSE - 1) / PSPACE + 1;    // 102

  cplx_t ybuf [N];
  cplx_t hp   [NPIL];
  cplx_t cfr  [NUSE];

  logic pilot_sym;
  assign pilot_sym = ((in_sym % 4'(PPERIOD)) == 4'd0);

  // ---- capture ----
  car_kind_e     in_kind;
  logic [$clog2(NPIL)-1:0] pidx;
  logic [8:0]    pr;
  assign in_kind = carrier_kind(in_idx, pilot_sym);

  // y * conj(sgn), sgn = (+-1 +-j) from the pilot PRBS, halved
  cplx_t hls;
  logic signed [31:0] ls_re, ls_im, sr, si;
  always_comb begin
    sr = pr[8] ? -1 : 1;
    si = pilot_prbs_step(pr)[8] ? -1 : 1;
    ls_re = int'(in_data.re) * sr + int'(in_data.im) * si;
    ls_im = int'(in_data.im) * sr - int'(in_data.re) * si;
    hls.re = DW'((ls_re + 1) >>> 1);
    hls.im = DW'((ls_im + 1) >>> 1);
  end

  typedef enum logic [1:0] {C_IDLE, C_INTERP, C_REPLAY} cstate_e;
  cstate_e st;
  logic [3:0] sym_q;
  logic       last_in;
  assign last_in = in_valid && in_idx == LG'(N - 1);

  always_ff @(posedge clk) begin
    if (in_valid) ybuf[in_idx] <= in_data;
    if (in_valid && in_kind == CAR_PILOT) hp[pidx] <= hls;
  end

  // ---- interpolation ----
  logic [$clog2(NUSE)-1:0] u;
  logic [$clog2(NPIL)-1:0] ip;
  logic [2:0]              d;
  cplx_t                   h_int, ha, hb;
  logic signed [31:0]      kq;
  logic signed [63:0]      dr, di;
  always_comb begin
    ha = hp[ip];
    hb = (int'(ip) == NPIL - 1) ? hp[ip] : hp[ip + 1'b1];
    // (hb - ha) * d / 6 with d/6 in Q15
    kq = (int'(d) * 32768 + 3) / 6;
    dr = (longint'(hb.re) - longint'(ha.re)) * kq;
    di = (longint'(hb.im) - longint'(ha.im)) * kq;
    h_int.re = DW'(longint'(ha.re) + ((dr + 16384) >>> 15));
    h_int.im = DW'(longint'(ha.im) + ((di + 16384) >>> 15));
  end

  // ---- replay ----
  logic [LG-1:0]           rc;
  logic [$clog2(NUSE)-1:0] ru;
  car_kind_e               rkind;
  logic                    rpil;
  assign rkind = carrier_kind(rc, rpil);

  assign busy = (st != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; pidx <= '0; pr <= '1; sym_q <= '0; u <= '0; ip <= '0; d <= '0;
      rc <= '0; ru <= '0; rpil <= 1'b0;
      out_valid <= 1'b0; out_idx <= '0; out_kind <= CAR_NULL; out_sym <= '0;
      out_y <= '0; out_h <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && in_idx == '0) begin pidx <= '0; pr <= '1; end
      if (in_valid && in_kind == CAR_PILOT) begin
        pidx <= pidx + 1'b1;
        pr   <= pilot_prbs_step(pilot_prbs_step(pr));
      end
      case (st)
        C_IDLE: if (last_in) begin
          sym_q <= in_sym; rpil <= pilot_sym; rc <= '0; ru <= '0;
          u <= '0; ip <= '0; d <= '0;
          st <= pilot_sym ? C_INTERP : C_REPLAY;
        end
        C_INTERP: begin
          cfr[u] <= h_int;
          if (int'(u) == NUSE - 1) st <= C_REPLAY;
          u <= u + 1'b1;
          if (d == 3'(PSPACE - 1)) begin d <= '0; ip <= ip + 1'b1; end
          else d <= d + 1'b1;
        end
        default: begin  // C_REPLAY
          out_valid <= 1'b1;
          out_idx   <= rc;
          out_kind  <= rkind;
          out_sym   <= sym_q;
          out_y     <= ybuf[rc];
          out_h     <= (rkind == CAR_NULL) ? '0 : cfr[ru];
          if (rkind != CAR_NULL) ru <= ru + 1'b1;
          rc <= rc + 1'b1;
          if (rc == LG'(N - 1)) st <= C_IDLE;
        end
      endcase
    end
  end

  // a symbol must not arrive while the previous one is being processed
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(in_valid && st != C_IDLE));
endmodule
