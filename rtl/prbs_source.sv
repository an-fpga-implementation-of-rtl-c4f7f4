// prbs_source: pseudo-random transmit data, standing in for the bit source
// of the transmitter.
//
// A PRBS-23 generator (b[n] = b[n-23] XOR b[n-18], the x^23+x^18+1 pattern)
// seeded with all ones. 'bits' always shows the next four bits of the
// sequence, the oldest in bit 0; a 'req' pulse consumes 'nbits' of them
// (2 for QPSK, 4 for 16-QAM) in the next clock. The reference design only says
// the data is random; the polynomial and seed are this implementation's.
module prbs_source (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       restart,   // back to the seed
  input  logic       req,
  input  logic [2:0] nbits,     // 1..4
  output logic [3:0] bits
);
  logic [22:0] s;   // s[22] is the oldest bit of the window

  function automatic logic [22:0] step(input logic [22:0] v);
    return {v[21:0], v[22] ^ v[17]};
  endfunction

  // the next four output bits are the four oldest window bits shifted out
  logic [22:0] s1, s2, s3, s4;
  assign s1 = step(s);
  assign s2 = step(s1);
  assign s3 = step(s2);
  assign s4 = step(s3);
  assign bits = {s3[22], s2[22], s1[22], s[22]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       s <= '1;
    else if (restart) s <= '1;
    else if (req) begin
      case (nbits)
        3'd1:    s <= s1;
        3'd2:    s <= s2;
        3'd3:    s <= s3;
        default: s <= s4;
      endcase
    end
  end
endmodule
