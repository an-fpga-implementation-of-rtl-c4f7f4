// pipe_div: pipelined restoring divider with a saturating quotient.
//
// q = min(num / den, 2^QW - 1) for unsigned num and den; den = 0 gives
// q = 0. One quotient bit is resolved per stage, most significant first, so
// a division enters every clock and leaves QW+1 clocks later. A TAGW-bit tag
// travels along with each division. Used by the zero-forcing equalizer.
//
// Not named by the reference design: this divider is how this implementation
// realises the zero-forcing division.
module pipe_div #(
  parameter int unsigned NW   = 48,
  parameter int unsigned DNW  = 32,
  parameter int unsigned QW   = 16,
  parameter int unsigned TAGW = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [NW-1:0]   num,
  input  logic [DNW-1:0]  den,
  input  logic [TAGW-1:0] in_tag,
  output logic            out_valid,
  output logic [QW-1:0]   q,
  output logic [TAGW-1:0] out_tag
);
  localparam int unsigned RW = NW + 1;

  logic [RW-1:0]   rem [QW+1];
  logic [DNW-1:0]  dv  [QW+1];
  logic [QW-1:0]   qv  [QW+1];
  logic            sat [QW+1];
  logic            vv  [QW+1];
  logic [TAGW-1:0] tg  [QW+1];

  // stage 0: overflow (num >= den * 2^QW) and zero checks
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem[0] <= '0; dv[0] <= '0; qv[0] <= '0; sat[0] <= 1'b0; vv[0] <= 1'b0; tg[0] <= '0;
    end else begin
      rem[0] <= RW'(num);
      dv[0]  <= den;
      qv[0]  <= '0;
      sat[0] <= (den != '0) && ((RW + QW)'(num) >= ((RW + QW)'(den) << QW));
      vv[0]  <= in_valid;
      tg[0]  <= in_tag;
    end
  end

  for (genvar s = 0; s < QW; s++) begin : g_st
    localparam int unsigned B = QW - 1 - s;   // quotient bit of this stage
    logic [RW+QW-1:0] sh;
    assign sh = (RW + QW)'(dv[s]) << B;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rem[s+1] <= '0; dv[s+1] <= '0; qv[s+1] <= '0; sat[s+1] <= 1'b0; vv[s+1] <= 1'b0; tg[s+1] <= '0;
      end else begin
        dv[s+1]  <= dv[s];
        sat[s+1] <= sat[s];
        vv[s+1]  <= vv[s];
        tg[s+1]  <= tg[s];
        if (dv[s] != '0 && (RW + QW)'(rem[s]) >= sh) begin
          rem[s+1] <= RW'((RW + QW)'(rem[s]) - sh);
          qv[s+1]  <= qv[s] | (QW'(1) << B);
        end else begin
          rem[s+1] <= rem[s];
          qv[s+1]  <= qv[s];
        end
      end
    end
  end

  assign out_valid = vv[QW];
  assign out_tag   = tg[QW];
  assign q         = sat[QW] ? '1 : qv[QW];
endmodule
