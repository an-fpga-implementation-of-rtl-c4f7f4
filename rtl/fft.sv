// fft: burst-mode radix-2 FFT / IFFT of N points.
//
// One symbol is processed in three phases:
//   LOAD    N clocks: 'in_valid' writes one sample per clock, natural order;
//   COMPUTE LOG2N stages of N/4 clocks: two decimation-in-frequency
//           butterflies per clock, in place in a register array;
//   UNLOAD  N clocks: 'out_valid' with one result per clock, natural order
//           (bit reversal is undone on reading).
// With SHIFT=1 the frequency-side index (the input of the IFFT, the output
// of the FFT) is spectrum ordered: index k is bin k XOR N/2, DC in the
// middle, which is the logical carrier order used throughout the transceiver. 'ready' is high while the core is
// in LOAD; a caller loads N samples, then waits for the N results.
// At N=1024 a symbol takes 2N + 10*N/4 = 4608 clocks plus a few of latency,
// within the 4*(N+CP) = 5120 clocks between symbols at four clocks per
// baseband sample.
//
// INVERSE=1 uses conjugate twiddles (IFFT). Stage s divides by 2 when bit s of
// SCALE_MASK is set; the default halves five of ten stages, so FFT and IFFT
// each scale by 1/sqrt(N) and a round trip has unit gain. Results saturate to
// DW bits. Twiddles (Q15) are constants computed at elaboration by an integer
// CORDIC, W_k = cos(2*pi*k/N) -/+ j*sin(2*pi*k/N).
//
// The reference design uses a vendor FFT core and states only its I/O needs
// (3N samples per symbol); the architecture here is this implementation's.
module fft
  import ofdm_pkg::*;
#(
  parameter int unsigned       N          = 1024,
  parameter bit                INVERSE    = 1'b0,
  parameter bit                SHIFT      = 1'b1,
  parameter logic [31:0]       SCALE_MASK = 32'h155
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 ready,
  input  logic                 in_valid,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_idx,
  output cplx_t                out_data
);
  localparam int unsigned LG = $clog2(N);
  localparam int unsigned IW = DW + 4;   // internal headroom
  // spectrum-order index swap, on the frequency side of the transform
  localparam logic [LG-1:0] XOR_IN  = (SHIFT && INVERSE)  ? LG'(N / 2) : '0;
  localparam logic [LG-1:0] XOR_OUT = (SHIFT && !INVERSE) ? LG'(N / 2) : '0;

  typedef struct packed {
    logic signed [IW-1:0] re;
    logic signed [IW-1:0] im;
  } icplx_t;

  icplx_t mem [N];

  // twiddle table, Q15
  logic signed [17:0] tw_c [N/2];
  logic signed [17:0] tw_s [N/2];
  for (genvar k = 0; k < N / 2; k++) begin : g_tw
    localparam logic [63:0] CS = cos_sin(AW'((64'(k) << AW) / N), 32767);
    assign tw_c[k] = 18'($signed(CS[63:32]));
    assign tw_s[k] = 18'($signed(CS[31:0]));
  end

  typedef enum logic [1:0] {S_LOAD, S_COMP, S_UNLOAD} state_e;
  state_e            state;
  logic [LG-1:0]     cnt;
  logic [$clog2(LG+1)-1:0] stage;

  function automatic logic [LG-1:0] bitrev(input logic [LG-1:0] v);
    for (int i = 0; i < LG; i++) bitrev[i] = v[LG-1-i];
  endfunction

  // butterfly addressing for butterfly j of the current stage
  function automatic logic [LG-1:0] bf_i0(input logic [LG-2:0] j, input int s);
    logic [LG-1:0] half, pos, grp;
    half = LG'(1) << (LG - 1 - s);
    pos  = LG'(j) & (half - 1);
    grp  = LG'(j) >> (LG - 1 - s);
    return (grp << (LG - s)) | pos;
  endfunction

  function automatic icplx_t bf_sum(input icplx_t a, input icplx_t b, input logic sc);
    logic signed [IW:0] r, i;
    r = (IW+1)'(a.re) + (IW+1)'(b.re);
    i = (IW+1)'(a.im) + (IW+1)'(b.im);
    if (sc) begin r = (r + 1) >>> 1; i = (i + 1) >>> 1; end
    return '{re: r[IW-1:0], im: i[IW-1:0]};
  endfunction

  function automatic icplx_t bf_diff(input icplx_t a, input icplx_t b, input logic sc,
                                     input logic signed [17:0] c, input logic signed [17:0] sn);
    logic signed [IW:0]    dr, di;
    logic signed [IW+19:0] pr, pi;
    logic signed [17:0]    wi;
    dr = (IW+1)'(a.re) - (IW+1)'(b.re);
    di = (IW+1)'(a.im) - (IW+1)'(b.im);
    wi = INVERSE ? sn : -sn;
    pr = (IW+20)'(dr) * (IW+20)'(c) - (IW+20)'(di) * (IW+20)'(wi);
    pi = (IW+20)'(dr) * (IW+20)'(wi) + (IW+20)'(di) * (IW+20)'(c);
    if (sc) begin
      pr = (pr + (IW+20)'(32768)) >>> 16;
      pi = (pi + (IW+20)'(32768)) >>> 16;
    end else begin
      pr = (pr + (IW+20)'(16384)) >>> 15;
      pi = (pi + (IW+20)'(16384)) >>> 15;
    end
    return '{re: pr[IW-1:0], im: pi[IW-1:0]};
  endfunction

  // two butterflies per clock: j = 2*cnt and 2*cnt+1
  logic [LG-2:0] j0, j1;
  logic [LG-1:0] a0, b0, a1, b1, t0, t1;
  logic          sc;
  always_comb begin
    j0 = {cnt[LG-3:0], 1'b0};
    j1 = {cnt[LG-3:0], 1'b1};
    a0 = bf_i0(j0, int'(stage));
    a1 = bf_i0(j1, int'(stage));
    b0 = a0 + (LG'(1) << (LG - 1 - int'(stage)));
    b1 = a1 + (LG'(1) << (LG - 1 - int'(stage)));
    t0 = (LG'(j0) & ((LG'(1) << (LG - 1 - int'(stage))) - 1)) << stage;
    t1 = (LG'(j1) & ((LG'(1) << (LG - 1 - int'(stage))) - 1)) << stage;
    sc = SCALE_MASK[int'(stage)];
  end

  function automatic logic signed [DW-1:0] sat(input logic signed [IW-1:0] v);
    if (v > IW'((1 <<< (DW-1)) - 1)) return DW'((1 <<< (DW-1)) - 1);
    if (v < -IW'(1 <<< (DW-1)))      return DW'(-(1 <<< (DW-1)));
    return v[DW-1:0];
  endfunction

  assign ready = (state == S_LOAD);

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid)
      mem[cnt ^ XOR_IN] <= '{re: IW'(in_data.re), im: IW'(in_data.im)};
    else if (state == S_COMP) begin
      mem[a0] <= bf_sum (mem[a0], mem[b0], sc);
      mem[b0] <= bf_diff(mem[a0], mem[b0], sc, tw_c[t0[LG-2:0]], tw_s[t0[LG-2:0]]);
      mem[a1] <= bf_sum (mem[a1], mem[b1], sc);
      mem[b1] <= bf_diff(mem[a1], mem[b1], sc, tw_c[t1[LG-2:0]], tw_s[t1[LG-2:0]]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD; cnt <= '0; stage <= '0;
      out_valid <= 1'b0; out_idx <= '0; out_data <= '0;
    end else begin
      out_valid <= 1'b0;
      case (state)
        S_LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == LG'(N - 1)) begin state <= S_COMP; cnt <= '0; stage <= '0; end
        end
        S_COMP: begin
          if (cnt == LG'(N / 4 - 1)) begin
            cnt <= '0;
            if (int'(stage) == LG - 1) state <= S_UNLOAD;
            else stage <= stage + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        default: begin  // S_UNLOAD
          out_valid     <= 1'b1;
          out_idx       <= cnt;
          out_data.re   <= sat(mem[bitrev(cnt ^ XOR_OUT)].re);
          out_data.im   <= sat(mem[bitrev(cnt ^ XOR_OUT)].im);
          cnt <= cnt + 1'b1;
          if (cnt == LG'(N - 1)) begin state <= S_LOAD; cnt <= '0; end
        end
      endcase
    end
  end
endmodule
