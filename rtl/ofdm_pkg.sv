// ofdm_pkg: types, frame geometry and shared helper functions of the OFDM
// transceiver.
//
// The frame follows an LTE-like layout: 1024 subcarriers, a 256-sample cyclic
// prefix, 208 unloaded guard subcarriers at each band edge, a nulled DC
// subcarrier, and a 12-symbol frame that carries pilots every 6th loaded
// subcarrier in its 1st, 5th and 9th symbols, preceded by a Zadoff-Chu
// training symbol. Those numbers come from the reference design. Sample width
// (16 bits), the binary-angle format (2^24 = 2*pi) and the CORDIC constants are
// this implementation's choices.
//
// Carrier indices are "logical": 0..1023 in spectrum order, DC at 512. The FFT
// bin of logical carrier c is c XOR 512.
package ofdm_pkg;

  localparam int unsigned DW      = 16;   // baseband sample width (per rail)
  localparam int unsigned AW      = 24;   // binary angle width, 2^AW = 2*pi
  localparam int unsigned NFFT    = 1024; // subcarriers
  localparam int unsigned LOG2N   = 10;
  localparam int unsigned NCP     = 256;  // cyclic prefix samples
  localparam int unsigned GUARD   = 208;  // unloaded carriers at each edge
  localparam int unsigned PSPACE  = 6;    // pilot spacing in loaded carriers
  localparam int unsigned NSYM    = 12;   // data symbols per frame
  localparam int unsigned PPERIOD = 4;    // pilots every 4th symbol (1st, 5th, 9th)
  localparam int unsigned OSR     = 4;    // clock cycles per baseband sample

  // 15 MHz IF at a 61.44 MHz clock: 15/61.44 * 2^32
  localparam logic [31:0] FCW_IF  = 32'd1048576000;

  // constellation amplitudes
  localparam int A_QPSK  = 2048;
  localparam int A_16QAM = 1024;
  localparam int A_PILOT = 2048;
  localparam int LOG2_A_PILOT = 11;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef enum logic [1:0] {
    CAR_NULL  = 2'd0,  // guard band or DC
    CAR_DATA  = 2'd1,
    CAR_PILOT = 2'd2
  } car_kind_e;

  // CORDIC arctangent table, atan(2^-i) in binary angle units (2^24 = 2*pi)
  localparam int unsigned CORDIC_MAX_ITER = 20;
  function automatic logic [AW-1:0] atan_tab(input int unsigned i);
    case (i)
      0: return 24'd2097152;  1: return 24'd1238021;  2: return 24'd654136;
      3: return 24'd332050;   4: return 24'd166669;   5: return 24'd83416;
      6: return 24'd41718;    7: return 24'd20860;    8: return 24'd10430;
      9: return 24'd5215;    10: return 24'd2608;    11: return 24'd1304;
     12: return 24'd652;     13: return 24'd326;     14: return 24'd163;
     15: return 24'd81;      16: return 24'd41;      17: return 24'd20;
     18: return 24'd10;      19: return 24'd5;
      default: return '0;
    endcase
  endfunction

  // 1/K for 16+ iterations, Q16
  localparam int CORDIC_INV_K_Q16 = 39797;

  // Integer CORDIC (rotation mode) for constant tables: returns
  // {cos, sin} of a binary angle, each scaled by 'amp'.
  function automatic logic [63:0] cos_sin(input logic [AW-1:0] ang, input int amp);
    longint x, y, xn, yn;
    logic [AW-1:0] z;
    logic [1:0] quad;
    quad = ang[AW-1 -: 2];
    z = {2'b00, ang[AW-3:0]};           // 0 .. pi/2
    x = (longint'(amp) * CORDIC_INV_K_Q16) <<< 8;  // extra 24 fraction bits
    y = 0;
    for (int i = 0; i < CORDIC_MAX_ITER; i++) begin
      if ($signed(z) >= 0) begin
        xn = x - (y >>> i); yn = y + (x >>> i); z = z - atan_tab(i);
      end else begin
        xn = x + (y >>> i); yn = y - (x >>> i); z = z + atan_tab(i);
      end
      x = xn; y = yn;
    end
    x = (x + 64'sd8388608) >>> 24;
    y = (y + 64'sd8388608) >>> 24;
    case (quad)
      2'd0: return {32'(x), 32'(y)};
      2'd1: return {32'(-y), 32'(x)};
      2'd2: return {32'(-x), 32'(-y)};
      default: return {32'(y), 32'(-x)};
    endcase
  endfunction

  // Classification of a logical carrier (0..NFFT-1) in a symbol that does or
  // does not carry pilots. Loaded carriers are GUARD..NFFT-GUARD-1 without DC;
  // among them every PSPACE-th one, starting with the first, is a pilot.
  function automatic car_kind_e carrier_kind(input logic [LOG2N-1:0] c, input logic pilot_sym);
    int unsigned u;
    if (int'(c) < GUARD || int'(c) >= NFFT - GUARD || int'(c) == NFFT/2) return CAR_NULL;
    u = (int'(c) > NFFT/2) ? int'(c) - GUARD - 1 : int'(c) - GUARD;
    if (pilot_sym && (u % PSPACE) == 0) return CAR_PILOT;
    return CAR_DATA;
  endfunction


  // Interpolation / decimation filter taps, Q15, unity DC gain.
  // Square-root raised cosine, roll-off 0.25, 2 samples per symbol, 21 taps:
  //   h(t) = [sin(pi t (1-b)) + 4 b t cos(pi t (1+b))] / [pi t (1 - (4 b t)^2)],
  //   t = (n-10)/2, normalised to a sum of 1.
  localparam int unsigned SRRC_TAPS = 21;
  function automatic int srrc_coef(input int unsigned i);
    case (i > 10 ? 20 - i : i)
      0: return -124;  1: return -48;   2: return 350;   3: return -301;
      4: return -618;  5: return 1075;  6: return 874;   7: return -2805;
      8: return -1058; 9: return 10241; default: return 17596;
    endcase
  endfunction
  // Halfband, 15 taps: 0.5*sinc((n-7)/2) with a Hamming window, sum of 1.
  localparam int unsigned HB_TAPS = 15;
  function automatic int hb_coef(input int unsigned i);
    case (i > 7 ? 14 - i : i)
      0: return -120; 2: return 530; 4: return -2242; 6: return 9993;
      7: return 16446; default: return 0;
    endcase
  endfunction


  // Pilot signs: PRBS-9 (b[n] = b[n-9] XOR b[n-5]), all-ones seed, restarted
  // at every pilot symbol; two bits per pilot give the signs of I and Q.
  function automatic logic [8:0] pilot_prbs_step(input logic [8:0] v);
    return {v[7:0], v[8] ^ v[4]};
  endfunction

  function automatic cplx_t sat_cplx(input longint re, input longint im);
    cplx_t r;
    longint mx, mn;
    mx = (64'sd1 <<< (DW-1)) - 1;
    mn = -(64'sd1 <<< (DW-1));
    r.re = (re > mx) ? DW'(mx) : (re < mn) ? DW'(mn) : DW'(re);
    r.im = (im > mx) ? DW'(mx) : (im < mn) ? DW'(mn) : DW'(im);
    return r;
  endfunction

endpackage
