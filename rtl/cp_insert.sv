// cp_insert: cyclic prefix insertion and symbol-to-frame serialisation.
//
// Two symbol buffers (ping-pong). The IFFT writes a whole symbol into the
// free buffer in one burst ('in_valid', 'in_idx' = time index 0..N-1). The
// read side plays buffers out at the baseband rate ('bb_en', one clock in
// four): first the last CP samples of the symbol (the cyclic prefix), then
// all N samples, N+CP outputs per symbol, back to back while buffers are
// full. With no symbol ready it outputs zeros. 'space' tells the producer
// that a buffer is free, so that a symbol it starts now has somewhere to go.
// 'sym_start' marks the first CP sample of each symbol on the output.
//
// Adding the prefix after the IFFT and joining symbols into frames follows the
// reference design; the ping-pong buffering and the zero output while idle are
// this implementation's.
module cp_insert
  import ofdm_pkg::*;
#(
  parameter int unsigned N  = 1024,
  parameter int unsigned CP = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [$clog2(N)-1:0] in_idx,
  input  cplx_t                in_data,
  output logic                 space,
  input  logic                 bb_en,
  output cplx_t                out_data,
  output logic                 sym_start
);
  localparam int unsigned LG = $clog2(N);
  localparam int unsigned RW = $clog2(N + CP);

  cplx_t buf_mem [2*N];

  logic       wb, rb;          // write and read buffer
  logic [1:0] nfull;           // buffers written and not yet played out
  logic       running;
  logic [RW-1:0] rcnt;         // 0 .. N+CP-1 within the symbol
  logic       wr_done, rd_done;

  assign space   = (nfull < 2'd2) && !in_valid;
  assign wr_done = in_valid && (in_idx == LG'(N - 1));
  assign rd_done = bb_en && running && (rcnt == RW'(N + CP - 1));

  always_ff @(posedge clk) begin
    if (in_valid) buf_mem[{wb, in_idx}] <= in_data;
  end

  // sample index within the stored symbol for output position rcnt
  logic [LG-1:0] ridx;
  assign ridx = (rcnt < RW'(CP)) ? LG'(rcnt + RW'(N - CP)) : LG'(rcnt - RW'(CP));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb <= 1'b0; rb <= 1'b0; nfull <= '0; running <= 1'b0; rcnt <= '0;
      out_data <= '0; sym_start <= 1'b0;
    end else begin
      if (wr_done) wb <= ~wb;
      nfull <= nfull + {1'b0, wr_done} - {1'b0, rd_done};
      if (bb_en) begin
        sym_start <= 1'b0;
        if (running) begin
          out_data  <= buf_mem[{rb, ridx}];
          sym_start <= (rcnt == '0);
          if (rcnt == RW'(N + CP - 1)) begin
            rcnt <= '0;
            rb   <= ~rb;
            running <= (nfull == 2'd2) || wr_done;  // next buffer already full
          end else rcnt <= rcnt + 1'b1;
        end else begin
          out_data <= '0;
          if (nfull != 2'd0) running <= 1'b1;
        end
      end
    end
  end
endmodule
