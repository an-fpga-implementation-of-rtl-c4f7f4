// dds: direct digital synthesizer, a 32-bit phase accumulator driving a
// CORDIC rotation of (AMP, 0). Each clock the phase advances by 'fcw'
// (f = fcw / 2^32 * f_clk) and cos/sin of the phase appear ITER+2 clocks
// later. The reference design uses a DDS for the IF mixers; building it from
// a CORDIC instead of a sine table is this implementation's choice.
module dds
  import ofdm_pkg::*;
#(
  parameter int AMP = 32000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [31:0]          fcw,
  output logic signed [DW-1:0] cos_o,
  output logic signed [DW-1:0] sin_o
);
  logic [31:0]   acc;
  logic [AW-1:0] zo;
  logic          vo;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= acc + fcw;
  end
  cordic #(.W(DW), .ITER(16), .VECTOR(1'b0)) u_rot (
    .clk, .rst_n, .in_valid(1'b1), .x_in(DW'(AMP)), .y_in('0), .z_in(acc[31 -: AW]),
    .out_valid(vo), .x_out(cos_o), .y_out(sin_o), .z_out(zo));
endmodule
