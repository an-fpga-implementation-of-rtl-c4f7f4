// tb_cp_insert: writes five symbols (sample i of symbol k holds re=i,
// im=k) in bursts whenever 'space' allows, reads at one sample per four
// clocks, and checks the output stream: zeros before the first symbol, then
// for each symbol the last 256 samples followed by all 1024, back to back,
// 'sym_start' on each first prefix sample, zeros again after the last one.
// Also checks that 'space' drops while both buffers are full.
//
// The 256-sample prefix is the reference design's; the handshake checked is
// this design's own.
`timescale 1ns/1ps
module tb_cp_insert;
  import ofdm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv = 0, space, bb_en, ss;
  logic [9:0] idx = 0;
  cplx_t din = '0, dout;
  logic [1:0] ph = 0;
  assign bb_en = (ph == 3);
  always @(posedge clk) ph <= ph + 1;
  cp_insert dut (.clk, .rst_n, .in_valid(iv), .in_idx(idx), .in_data(din), .space,
                 .bb_en, .out_data(dout), .sym_start(ss));

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int nsent = 0, nfull_seen = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (40) @(posedge clk);
    while (nsent < 5) begin
      @(negedge clk);
      if (space) begin
        for (int i = 0; i < 1024; i++) begin
          iv = 1; idx = 10'(i); din.re = 16'(i); din.im = 16'(nsent);
          @(negedge clk);
        end
        iv = 0; nsent++;
      end else nfull_seen++;
    end
  end

  // output checker on bb_en samples (the value is visible the clock after)
  int pos = 0, started = 0, outs = 0;
  logic bb_d = 0;
  always @(posedge clk) begin
    bb_d <= bb_en;
    #1;
    if (bb_d && rst_n) begin
      if (!started && (dout.re != 0 || dout.im != 0 || ss)) started = 1;
      if (started && outs < 5 * 1280) begin
        automatic int k = outs / 1280, p = outs % 1280;
        automatic int ei = (p < 256) ? p + 768 : p - 256;
        checks++;
        if (int'(dout.re) != ei || int'(dout.im) != k || ss != (p == 0)) begin
          failures++;
          if (failures < 10) $display("out %0d: got %0d,%0d ss=%b exp %0d,%0d", outs, dout.re, dout.im, ss, ei, k);
        end
        outs++;
      end else if (outs >= 5 * 1280) begin
        checks++;
        if (dout.re != 0 || dout.im != 0) begin failures++; $display("not zero after the last symbol"); end
        outs++;
      end
    end
  end

  initial begin
    wait (outs == 5 * 1280 + 20);
    checks++; if (nfull_seen == 0) begin failures++; $display("space never low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
