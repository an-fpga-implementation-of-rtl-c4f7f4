// tb_zf_equalizer: random channel values h (magnitude 0.1..2 in units of
// A_PILOT = 2048, random phase) and random constellation-sized symbols x;
// the equaliser gets y = h*x/2048 (rounded) and must return y*conj(h)*2048/|h|^2
// computed in real arithmetic from the same integer y and h, within 1 LSB
// (the dividers truncate), saturated to +-32767. Also: h = 0 gives 0, very
// small h saturates, carrier number/kind/symbol travel with the data, one
// result per clock with back-to-back inputs, and the latency is exactly
// LAT = 17 clocks (16 divider stages and the output register).
//
// Zero forcing is the reference design's; the arithmetic checked is this
// design's own.
`timescale 1ns/1ps
module tb_zf_equalizer;
  import ofdm_pkg::*;
  localparam int N = 1024, LAT = 17;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv = 0, ov;
  logic [9:0] ii = '0, oi;
  logic [3:0] is = '0, os;
  car_kind_e ik = CAR_NULL, ok;
  cplx_t iy = '0, ih = '0, ox;
  zf_equalizer #(.N(N)) dut (.clk, .rst_n, .in_valid(iv), .in_idx(ii), .in_kind(ik), .in_sym(is),
    .in_y(iy), .in_h(ih), .out_valid(ov), .out_idx(oi), .out_kind(ok), .out_sym(os), .out_x(ox));

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction
  function automatic real clip(input real v); return v > 32767.0 ? 32767.0 : (v < -32767.0 ? -32767.0 : v); endfunction

  real er [$], ei [$];
  int  etag [$], tin [$];
  int  cyc = 0, nout = 0, bad = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    #1;
    if (ov) begin
      automatic real r = er.pop_front(), i = ei.pop_front();
      automatic int tg = etag.pop_front(), t0 = tin.pop_front();
      nout++;
      checks++;
      if (fabs(real'(ox.re) - r) > 1.0 || fabs(real'(ox.im) - i) > 1.0) begin
        failures++; if (bad++ < 8) $display("got %0d,%0d exp %0.2f,%0.2f", ox.re, ox.im, r, i);
      end
      checks++;
      if ({oi, ok, os} != 16'(tg)) begin failures++; if (bad++ < 8) $display("tag mismatch"); end
      checks++;
      if (cyc - t0 != LAT) begin failures++; if (bad++ < 8) $display("latency %0d", cyc - t0); end
    end
  end

  task automatic drive(input int yr, input int yi, input int hr, input int hi);
    automatic real d = real'(hr) * real'(hr) + real'(hi) * real'(hi);
    @(negedge clk);
    iv = 1; iy.re = 16'(yr); iy.im = 16'(yi); ih.re = 16'(hr); ih.im = 16'(hi);
    ii = 10'($urandom); is = 4'($urandom); ik = car_kind_e'($urandom_range(0, 2));
    if (d == 0.0) begin er.push_back(0.0); ei.push_back(0.0); end
    else begin
      er.push_back(clip((real'(yr) * hr + real'(yi) * hi) * 2048.0 / d));
      ei.push_back(clip((real'(yi) * hr - real'(yr) * hi) * 2048.0 / d));
    end
    etag.push_back(int'({ii, ik, is}));
    tin.push_back(cyc);
  endtask

  initial begin
    int nin = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      automatic real m = (0.1 + 1.9 * real'($urandom_range(0, 1000)) / 1000.0) * 2048.0;
      automatic real p = 2.0 * PI * real'($urandom_range(0, 1000)) / 1000.0;
      automatic int hr = $rtoi(m * $cos(p)), hi = $rtoi(m * $sin(p));
      automatic int xr = 1024 * (2 * int'($urandom_range(0, 3)) - 3);
      automatic int xi = 1024 * (2 * int'($urandom_range(0, 3)) - 3);
      automatic int yr = $rtoi((real'(xr) * hr - real'(xi) * hi) / 2048.0);
      automatic int yi = $rtoi((real'(xr) * hi + real'(xi) * hr) / 2048.0);
      drive(yr, yi, hr, hi); nin++;
      if (k % 500 == 0) begin drive(yr, yi, 0, 0); nin++; end            // null carrier
      if (k % 500 == 1) begin drive(20000, -20000, 3, -2); nin++; end    // saturation
      if ($urandom_range(0, 3) == 0) begin @(negedge clk); iv = 0; end
    end
    @(negedge clk); iv = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (nout != nin) begin failures++; $display("%0d outputs for %0d inputs", nout, nin); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
