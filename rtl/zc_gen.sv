// zc_gen: Zadoff-Chu sequence generator for the frame's training symbol.
//
// Element n of the root-u sequence of length NZC is
//   x(n) = A * exp(-j*pi*u*n*(n+1)/NZC).
// The generator keeps q(n) = u*n*(n+1)/2 mod NZC with two modular
// accumulators (q(n+1) = q(n) + t(n), t(n) = u*(n+1) mod NZC), turns
// -q/NZC of a turn into a binary angle with one constant multiply, and rotates
// (A, 0) by it in a CORDIC. 'next' requests the next element; it appears on
// 'zc' with 'zc_valid' LAT clocks later. 'restart' returns to element 0.
//
// The reference design puts a ZC training symbol at the head of each frame
// for time synchronisation; its length and root are not given. Here the
// sequence fills the 607 loaded subcarriers (607 is prime) with root 25, one
// of the LTE primary synchronisation roots.
module zc_gen
  import ofdm_pkg::*;
#(
  parameter int unsigned NZC  = 607,
  parameter int unsigned ROOT = 25,
  parameter int          AMP  = 2896   // about A_QPSK*sqrt(2): same power as QPSK
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  restart,
  input  logic  next,
  output logic  zc_valid,
  output cplx_t zc
);
  localparam int unsigned QW  = $clog2(NZC) + 1;
  localparam int unsigned ITER = 16;
  localparam int unsigned LAT  = ITER + 2;
  // 2^(AW+16)/NZC, rounded
  localparam longint RECIP = ((64'd1 << (AW + 16)) + 64'(NZC) / 2) / 64'(NZC);

  logic [QW-1:0] q, t;
  logic [QW:0]   qn, tn;

  assign qn = {1'b0, q} + {1'b0, t};
  assign tn = {1'b0, t} + (QW+1)'(ROOT % NZC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; t <= QW'(ROOT % NZC);
    end else if (restart) begin
      q <= '0; t <= QW'(ROOT % NZC);
    end else if (next) begin
      q <= (qn >= (QW+1)'(NZC)) ? QW'(qn - (QW+1)'(NZC)) : QW'(qn);
      t <= (tn >= (QW+1)'(NZC)) ? QW'(tn - (QW+1)'(NZC)) : QW'(tn);
    end
  end

  logic [AW+QW+16:0] prod;
  logic [AW-1:0]     ang;
  assign prod = (AW+QW+17)'(q) * (AW+QW+17)'(RECIP) + (AW+QW+17)'(1 << 15);
  assign ang  = -prod[AW+15:16];

  logic signed [DW-1:0] xo, yo;
  logic [AW-1:0]        zo;
  cordic #(.W(DW), .ITER(ITER), .VECTOR(1'b0)) u_rot (
    .clk, .rst_n, .in_valid(next && !restart),
    .x_in(DW'(AMP)), .y_in('0), .z_in(ang),
    .out_valid(zc_valid), .x_out(xo), .y_out(yo), .z_out(zo)
  );
  assign zc.re = xo;
  assign zc.im = yo;
endmodule
