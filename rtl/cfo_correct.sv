// cfo_correct: carrier frequency offset correction by a CORDIC rotation.
//
// 'load' takes the synchroniser's angle ang = angle(ms2) = -2*pi*eps and
// clears the phase. The angle is divided by N (by keeping LOG2N extra
// fraction bits in the phase accumulator) and accumulated once per baseband
// sample ('adv'), so sample k is rotated by phi(k) = ang*k/N, undoing the
// e^{j*2*pi*eps*k/N} of the offset (eq. 8/9 of the reference design).
// The phase keeps running across cyclic prefixes and symbols of a frame so
// consecutive symbols stay phase-continuous; the constant phase left over is
// removed by the channel estimator. Samples with 'in_valid' are rotated and
// come out with 'out_valid' 18 clocks later (CORDIC latency).
module cfo_correct
  import ofdm_pkg::*;
#(
  parameter int unsigned N = 1024
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] angle,
  input  logic          adv,
  input  logic          in_valid,
  input  cplx_t         in_data,
  output logic          out_valid,
  output cplx_t         out_data
);
  localparam int unsigned LG = $clog2(N);
  localparam int unsigned PW = AW + LG;

  logic [PW-1:0] inc, acc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inc <= '0; acc <= '0;
    end else if (load) begin
      inc <= PW'($signed(angle));   // sign-extended: ang / N with LG fraction bits
      acc <= '0;
    end else if (adv) begin
      acc <= acc + inc;
    end
  end

  logic [AW-1:0] zo;
  cordic #(.W(DW), .ITER(16), .VECTOR(1'b0)) u_rot (
    .clk, .rst_n, .in_valid(in_valid && !load),
    .x_in(in_data.re), .y_in(in_data.im), .z_in(acc[PW-1 -: AW]),
    .out_valid(out_valid), .x_out(out_data.re), .y_out(out_data.im), .z_out(zo));
endmodule
