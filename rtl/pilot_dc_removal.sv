// pilot_dc_removal: keeps only the data-carrying subcarriers of the
// equalised stream.
//
// Each carrier is classified again from its logical number and its
// symbol's number in the frame (guard bands, the DC carrier and, in pilot
// symbols 0, 4 and 8, every 6th loaded carrier are dropped); the rest pass
// to the demapper with one clock of latency, in carrier order. The
// classification does not trust the upstream kind tag; 'mismatch' flags a
// carrier whose tag disagrees.
//
// Removing pilots and DC before demapping follows the reference design; the
// re-classification and the mismatch flag are this implementation's.
module pilot_dc_removal
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
  input  cplx_t                in_x,
  output logic                 out_valid,
  output logic [3:0]           out_sym,
  output cplx_t                out_x,
  output logic                 mismatch
);
  car_kind_e k;
  assign k = carrier_kind(in_idx, (in_sym % 4'(PPERIOD)) == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_sym <= '0; out_x <= '0; mismatch <= 1'b0;
    end else begin
      out_valid <= in_valid && k == CAR_DATA;
      out_sym   <= in_sym;
      out_x     <= in_x;
      mismatch  <= in_valid && k != in_kind;
    end
  end
endmodule
