// cordic: pipelined CORDIC in circular coordinates, rotation or vectoring.
//
// VECTOR=0 (rotation): (x_out, y_out) = (x_in, y_in) rotated by z_in.
// VECTOR=1 (vectoring): x_out = |(x_in, y_in)|, z_out = atan2(y_in, x_in),
// y_out is the (near zero) residue.
// Angles are binary: 2^AW is one full turn, read as two's complement.
// The CORDIC gain is removed by a final multiply with 1/K, so magnitudes
// come out at unit gain.
//
// Stage 0 folds the vector into the right half plane (vectoring) or the
// angle into [-pi/2, pi/2) (rotation); ITER micro-rotation stages follow, then
// the gain-compensation stage. Four guard bits below the input LSB keep
// the rounding error of the micro-rotations under one output LSB. Latency is ITER+2 clocks, one result per clock;
// in_valid travels along with the data as out_valid.
//
// The reference design uses a vendor CORDIC core in both modes (arctangent
// for the synchroniser, rotate for the CFO correction); this pipelined
// structure and its widths are this implementation's choice.
module cordic
  import ofdm_pkg::*;
#(
  parameter int unsigned W      = 16,  // data width
  parameter int unsigned ITER   = 16,  // micro-rotations (<= CORDIC_MAX_ITER)
  parameter bit          VECTOR = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  x_in,
  input  logic signed [W-1:0]  y_in,
  input  logic        [AW-1:0] z_in,
  output logic                 out_valid,
  output logic signed [W-1:0]  x_out,
  output logic signed [W-1:0]  y_out,
  output logic        [AW-1:0] z_out
);
  localparam int unsigned G  = 4;       // fraction guard bits
  localparam int unsigned IW = W + 2 + G;   // growth of up to 1.65*sqrt(2)

  logic signed [IW-1:0] xs [ITER+1];
  logic signed [IW-1:0] ys [ITER+1];
  logic        [AW-1:0] zs [ITER+1];
  logic                 vs [ITER+1];

  // stage 0: quadrant folding
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; vs[0] <= 1'b0;
    end else begin
      vs[0] <= in_valid;
      if (VECTOR) begin
        if (x_in < 0) begin
          xs[0] <= -(IW'(x_in) <<< G); ys[0] <= -(IW'(y_in) <<< G); zs[0] <= {1'b1, {(AW-1){1'b0}}};
        end else begin
          xs[0] <= IW'(x_in) <<< G;  ys[0] <= IW'(y_in) <<< G;  zs[0] <= '0;
        end
      end else begin
        if (z_in[AW-1] != z_in[AW-2]) begin  // |angle| >= pi/2: rotate by pi first
          xs[0] <= -(IW'(x_in) <<< G); ys[0] <= -(IW'(y_in) <<< G); zs[0] <= {~z_in[AW-1], z_in[AW-2:0]};
        end else begin
          xs[0] <= IW'(x_in) <<< G;  ys[0] <= IW'(y_in) <<< G;  zs[0] <= z_in;
        end
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    logic dir;  // 1: rotate counter-clockwise
    assign dir = VECTOR ? (ys[i] < 0) : !zs[i][AW-1];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0; vs[i+1] <= 1'b0;
      end else begin
        vs[i+1] <= vs[i];
        if (dir) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - atan_tab(i);
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + atan_tab(i);
        end
      end
    end
  end

  // gain compensation with rounding and saturation
  logic signed [IW+17:0] xk, yk;
  assign xk = ($signed(xs[ITER]) * 18'sd39797 + (IW+18)'(1 << (15 + G))) >>> (16 + G);
  assign yk = ($signed(ys[ITER]) * 18'sd39797 + (IW+18)'(1 << (15 + G))) >>> (16 + G);

  function automatic logic signed [W-1:0] sat(input logic signed [IW+17:0] v);
    if (v > (IW+18)'((1 <<< (W-1)) - 1)) return W'((1 <<< (W-1)) - 1);
    if (v < -(IW+18)'(1 <<< (W-1)))      return W'(-(1 <<< (W-1)));
    return v[W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; x_out <= '0; y_out <= '0; z_out <= '0;
    end else begin
      out_valid <= vs[ITER];
      x_out     <= sat(xk);
      y_out     <= sat(yk);
      z_out     <= zs[ITER];
    end
  end

endmodule
