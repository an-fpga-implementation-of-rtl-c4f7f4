// beek_sync: maximum-likelihood (van de Beek) estimator of symbol arrival
// time and carrier frequency offset, from the cyclic prefix.
//
// For the newest baseband sample r(t) the block forms, over a sliding window
// of the last L=CP sample pairs (r(k), r(k+N)):
//   ms2 = sum r(k) r*(k+N)                       (correlation, eq. 5)
//   ms1 = 1/2 sum |r(k)|^2 + |r(k+N)|^2          (energy, eq. 4, rho = 1)
// Both are running sums updated recursively: the newest pair is added and
// the pair L samples older is subtracted; samples come from one delay
// memory of N+L samples. ms2 goes through a CORDIC in vectoring mode, giving
// |ms2| and angle(ms2) = -2*pi*eps. The timing metric is the difference
//   metric = ms1 - |ms2|,
// which falls towards zero when the window lies on a cyclic prefix (a
// subtraction instead of a division, as in the reference design).
//
// Peak detection, also as in the reference design: while the metric is
// below the threshold (metric * 2^TH_SHIFT < ms1, with ms1 above an energy
// floor EFLOOR) the first sample whose successor has a larger metric is the
// peak. 'peak' pulses one clock, with 'angle' the CORDIC angle at the peak
// sample. After a peak the detector re-arms only once the metric leaves the
// threshold region. The 3-sample shift into the CP is applied by the data
// forwarding block, which knows the sample positions.
//
// Timing: with one sample every four clocks, the peak for a window ending
// on sample t is flagged after sample t+5 has arrived and before t+6
// (PEAK_LAT = 5 samples: the minimum is only known once the next metric,
// 18 clocks of CORDIC later, has risen). With noise or with data symbols,
// whose power varies from sample to sample, the first local minimum can come
// a few samples early, as the reference design notes; that is why the frame
// start is moved into the cyclic prefix.
// Sums are 48 bits; the CORDIC sees them shifted right by SH bits.
module beek_sync
  import ofdm_pkg::*;
#(
  parameter int unsigned N        = 1024,
  parameter int unsigned CP       = 256,
  parameter int unsigned SH       = 16,
  parameter int unsigned TH_SHIFT = 3,
  parameter longint      EFLOOR   = 4096
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  cplx_t         in_data,
  output logic          peak,
  output logic [AW-1:0] angle,
  output logic [31:0]   metric_o,   // for observation
  output logic [31:0]   energy_o
);
  localparam int unsigned DEPTH = 1 << $clog2(N + CP + 1);
  localparam int unsigned PW    = $clog2(DEPTH);
  localparam int unsigned CW    = 26;   // CORDIC width
  localparam int unsigned CLAT  = 18;   // CORDIC latency (ITER + 2)

  cplx_t       dmem [DEPTH];
  logic [PW-1:0] wp;

  // samples taken since reset, saturating: delayed samples older than the
  // first one read as zero, so that the running sums never subtract a term
  // that the uninitialised delay memory never received
  localparam int unsigned FW = $clog2(N + CP + 1);
  logic [FW-1:0] fill;

  cplx_t r0, rn, rl, rnl;   // r(t), r(t-N), r(t-L), r(t-N-L)
  assign r0  = in_data;
  assign rn  = (fill >= FW'(N))      ? dmem[wp - PW'(N)]      : '0;
  assign rl  = (fill >= FW'(CP))     ? dmem[wp - PW'(CP)]     : '0;
  assign rnl = (fill >= FW'(N + CP)) ? dmem[wp - PW'(N + CP)] : '0;

  function automatic longint cmul_re(input cplx_t a, input cplx_t b); // Re{a b*}
    return longint'(a.re) * b.re + longint'(a.im) * b.im;
  endfunction
  function automatic longint cmul_im(input cplx_t a, input cplx_t b); // Im{a b*}
    return longint'(a.im) * b.re - longint'(a.re) * b.im;
  endfunction
  function automatic longint pwr(input cplx_t a);
    return longint'(a.re) * a.re + longint'(a.im) * a.im;
  endfunction

  logic signed [47:0] s2re, s2im, s1;
  logic               va;

  always_ff @(posedge clk) begin
    if (in_valid) dmem[wp] <= r0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; s2re <= '0; s2im <= '0; s1 <= '0; va <= 1'b0; fill <= '0;
    end else begin
      va <= in_valid;
      if (in_valid) begin
        wp   <= wp + 1'b1;
        if (fill != FW'(N + CP)) fill <= fill + 1'b1;
        s2re <= s2re + 48'(cmul_re(rn, r0) - cmul_re(rnl, rl));
        s2im <= s2im + 48'(cmul_im(rn, r0) - cmul_im(rnl, rl));
        s1   <= s1 + 48'(pwr(rn) + pwr(r0) - pwr(rnl) - pwr(rl));
      end
    end
  end

  // CORDIC vectoring of ms2
  logic signed [CW-1:0] mag, resid;
  logic [AW-1:0]        ang;
  logic                 vc;
  cordic #(.W(CW), .ITER(16), .VECTOR(1'b1)) u_vec (
    .clk, .rst_n, .in_valid(va),
    .x_in(CW'(s2re >>> SH)), .y_in(CW'(s2im >>> SH)), .z_in('0),
    .out_valid(vc), .x_out(mag), .y_out(resid), .z_out(ang));

  // ms1 aligned with the CORDIC output
  logic signed [CW-1:0] e_dl [CLAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CLAT; i++) e_dl[i] <= '0;
    end else begin
      e_dl[0] <= CW'(s1 >>> (SH + 1));
      for (int i = 1; i < CLAT; i++) e_dl[i] <= e_dl[i-1];
    end
  end

  logic signed [CW:0] metric, prev_metric;
  logic               below, prev_below, armed;
  logic [AW-1:0]      prev_ang;
  assign metric = (CW+1)'(e_dl[CLAT-1]) - (CW+1)'(mag);
  assign below  = (longint'(e_dl[CLAT-1]) > EFLOOR) &&
                  ((longint'(metric) <<< TH_SHIFT) < longint'(e_dl[CLAT-1]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_metric <= '0; prev_below <= 1'b0; armed <= 1'b1; prev_ang <= '0;
      peak <= 1'b0; angle <= '0; metric_o <= '0; energy_o <= '0;
    end else begin
      peak <= 1'b0;
      if (vc) begin
        prev_metric <= metric;
        prev_below  <= below;
        prev_ang    <= ang;
        metric_o    <= 32'(metric);
        energy_o    <= 32'(e_dl[CLAT-1]);
        if (!below) armed <= 1'b1;
        else if (armed && prev_below && metric > prev_metric) begin
          peak  <= 1'b1;
          angle <= prev_ang;
          armed <= 1'b0;
        end
      end
    end
  end
endmodule
