// zf_equalizer: zero-forcing equalisation, x = y / h per carrier.
//
// Computed as x = y * conj(h) * A_PILOT / |h|^2, where h is the channel
// estimate in units of A_PILOT (see ls_chest), so x comes out in the
// transmitter's constellation units. The two real divisions run in
// pipelined restoring dividers; the quotient magnitude saturates at
// 2^(DW-1)-1 and h = 0 (null carriers) gives x = 0. Carrier number, kind and
// symbol number travel with the data. Latency 17 clocks, one carrier per
// clock. The reference design names a zero-forcing equaliser; the arithmetic
// is this implementation's.
module zf_equalizer
  import ofdm_pkg::*;
#(
  parameter int unsigned N = 1024
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [$clog2(N)-1:0] in_idx,
  input  car_kind_e            in_kind,
  input  logic [3:0]           in_sym,
  input  cplx_t                in_y,
  input  cplx_t                in_h,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_idx,
  output car_kind_e            out_kind,
  output logic [3:0]           out_sym,
  output cplx_t                out_x
);
  localparam int unsigned LG   = $clog2(N);
  localparam int unsigned NW   = 2 * DW + LOG2_A_PILOT + 1;   // |num| bits
  localparam int unsigned TAGW = LG + 2 + 4 + 1;

  logic signed [63:0] nre, nim, den;
  always_comb begin
    nre = (longint'(in_y.re) * in_h.re + longint'(in_y.im) * in_h.im) <<< LOG2_A_PILOT;
    nim = (longint'(in_y.im) * in_h.re - longint'(in_y.re) * in_h.im) <<< LOG2_A_PILOT;
    den = longint'(in_h.re) * in_h.re + longint'(in_h.im) * in_h.im;
  end

  logic [NW-1:0] are, aim;
  assign are = NW'(nre < 0 ? -nre : nre);
  assign aim = NW'(nim < 0 ? -nim : nim);

  logic [TAGW-1:0] tin, tre, tim;
  assign tin = {in_idx, in_kind, in_sym, 1'b0};

  logic          vre, vim;
  logic [DW-2:0] qre, qim;
  pipe_div #(.NW(NW), .DNW(2*DW), .QW(DW-1), .TAGW(TAGW)) u_div_re (
    .clk, .rst_n, .in_valid, .num(are), .den(32'(den)), .in_tag({tin[TAGW-1:1], nre < 0}),
    .out_valid(vre), .q(qre), .out_tag(tre));
  pipe_div #(.NW(NW), .DNW(2*DW), .QW(DW-1), .TAGW(TAGW)) u_div_im (
    .clk, .rst_n, .in_valid, .num(aim), .den(32'(den)), .in_tag({tin[TAGW-1:1], nim < 0}),
    .out_valid(vim), .q(qim), .out_tag(tim));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_idx <= '0; out_kind <= CAR_NULL; out_sym <= '0; out_x <= '0;
    end else begin
      out_valid <= vre;
      {out_idx, out_kind, out_sym} <= tre[TAGW-1:1];
      out_x.re <= tre[0] ? -DW'(qre) : DW'(qre);
      out_x.im <= tim[0] ? -DW'(qim) : DW'(qim);
    end
  end
endmodule
