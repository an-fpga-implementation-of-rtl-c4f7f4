// tb_cordic: checks the pipelined CORDIC in both modes against real math.
// Rotation: random vectors and angles, compared with the rotated vector.
// Vectoring: random vectors, compared with magnitude and atan2. Results
// must come out exactly ITER+2 clocks after their input.
//
// The reference design names CORDIC vectoring and rotation; widths and
// tolerances here are this design's own.
`timescale 1ns/1ps
module tb_cordic;
  import ofdm_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv = 0, rv, vv;
  logic signed [15:0] xi = 0, yi = 0, rx, ry, vx, vy;
  logic [AW-1:0] zi = 0, rz, vz;
  cordic #(.W(16), .ITER(16), .VECTOR(1'b0)) u_rot (.clk, .rst_n, .in_valid(iv), .x_in(xi), .y_in(yi), .z_in(zi),
    .out_valid(rv), .x_out(rx), .y_out(ry), .z_out(rz));
  cordic #(.W(16), .ITER(16), .VECTOR(1'b1)) u_vec (.clk, .rst_n, .in_valid(iv), .x_in(xi), .y_in(yi), .z_in('0),
    .out_valid(vv), .x_out(vx), .y_out(vy), .z_out(vz));

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction

  // queue of expected results
  real ex_r [$], ey_r [$], em [$], ea [$];
  int  tin [$];
  int  cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    #1;
    if (rv) begin
      automatic real er = ex_r.pop_front(), eyv = ey_r.pop_front();
      automatic real m = em.pop_front(), a = ea.pop_front();
      automatic int t0 = tin.pop_front();
      automatic real da;
      checks++;
      if (fabs(real'(rx) - er) > 3.0 || fabs(real'(ry) - eyv) > 3.0) begin
        failures++; $display("rotate: got %0d,%0d exp %0.1f,%0.1f", rx, ry, er, eyv);
      end
      checks++;
      if (fabs(real'(vx) - m) > 3.0) begin failures++; $display("magnitude: got %0d exp %0.1f", vx, m); end
      da = real'($signed(vz)) / 16777216.0 - a;
      if (da > 0.5) da -= 1.0;
      if (da < -0.5) da += 1.0;
      checks++;
      if (fabs(da) > 0.0002) begin failures++; $display("angle: got %0d exp %f turns", $signed(vz), a); end
      checks++;
      if (cyc - t0 != 18) begin failures++; $display("latency %0d", cyc - t0); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      real x, y, th, mag;
      @(negedge clk);
      x = real'($urandom_range(0, 40000)) - 20000.0;
      y = real'($urandom_range(0, 40000)) - 20000.0;
      if (i < 4) begin x = (i[0] ? -1.0 : 1.0) * 15000.0; y = (i[1] ? -1.0 : 1.0) * 3.0; end
      zi = AW'($urandom);
      th = 2.0 * PI * real'(zi) / 16777216.0;
      xi = 16'($rtoi(x)); yi = 16'($rtoi(y)); iv = 1;
      // rotation results beyond 16 bits saturate: keep inputs small enough
      mag = $sqrt(x * x + y * y);
      if (mag > 32000.0) begin xi = xi / 2; yi = yi / 2; x = real'(xi); y = real'(yi); end
      ex_r.push_back(x * $cos(th) - y * $sin(th));
      ey_r.push_back(x * $sin(th) + y * $cos(th));
      em.push_back($sqrt(x * x + y * y));
      ea.push_back($atan2(y, x) / (2.0 * PI));
      tin.push_back(cyc);
    end
    @(negedge clk); iv = 0;
    repeat (30) @(posedge clk);
    checks++; if (ex_r.size() != 0) begin failures++; $display("missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
