// tb_prbs_source: checks the PRBS-23 generator against an independent
// bit-by-bit model of b[n] = b[n-23] XOR b[n-18] with an all-ones start,
// consuming 1, 2, 3 or 4 bits at a time with idle clocks in between, and
// checks that 'restart' returns to the start of the sequence.
//
// The reference design only says the data is random; the PRBS-23 is this
// design's own choice.
`timescale 1ns/1ps
module tb_prbs_source;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic restart = 0, req = 0;
  logic [2:0] nbits = 2;
  logic [3:0] bits;
  prbs_source dut (.clk, .rst_n, .restart, .req, .nbits, .bits);

  bit hist [$];
  function automatic bit model_bit(input int n);
    // bit n of the sequence (n from 0)
    while (hist.size() <= n) begin
      if (hist.size() < 23) hist.push_back(1'b1);
      else hist.push_back(hist[hist.size() - 23] ^ hist[hist.size() - 18]);
    end
    return hist[n];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int pos = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (bits[b] != model_bit(pos + b)) begin
          failures++; if (failures < 10) $display("bit %0d: got %b exp %b", pos + b, bits[b], model_bit(pos + b));
        end
      end
      nbits = 3'($urandom_range(1, 4));
      req = ($urandom_range(0, 3) != 0);
      if (req) pos += int'(nbits);
    end
    @(negedge clk); req = 0; restart = 1;
    @(negedge clk); restart = 0;
    for (int b = 0; b < 4; b++) begin
      checks++; if (bits[b] != model_bit(b)) begin failures++; $display("restart bit %0d wrong", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
