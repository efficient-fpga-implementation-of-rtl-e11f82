// tb_cordic_rotate: rotates random vectors by random angles (all four
// quadrants) and compares with 1.64676 * (x cos - y sin, x sin + y cos)
// computed in floating point; also checks the ITER+1 = 19 cycle latency.
module tb_cordic_rotate;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, done, busy;
  sample_t xi, yi;
  angle_t ang;
  logic signed [22:0] xo, yo;
  cordic_rotate dut (.clk, .rst_n, .start, .xi, .yi, .ang, .done, .xo, .yo, .busy);

  localparam real PI = 3.14159265358979;
  localparam real G  = 1.646760258;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    int quad [4] = '{0, 0, 0, 0};
    real th, ex, ey, gx, gy;
    start = 0; xi = '0; yi = '0; ang = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      xi  = sample_t'($urandom_range(0, 180000) - 90000);
      yi  = sample_t'($urandom_range(0, 180000) - 90000);
      ang = angle_t'($urandom);
      if (n < 4) ang = angle_t'(n * 65536);
      quad[ang[17:16]]++;
      th = real'(ang) * 2.0 * PI / 262144.0;
      ex = G * (real'(xi) * $cos(th) - real'(yi) * $sin(th));
      ey = G * (real'(xi) * $sin(th) + real'(yi) * $cos(th));
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      gx = real'(xo) / 4.0;
      gy = real'(yo) / 4.0;
      checks += 3;
      if (lat != 19) begin failures++; $display("latency %0d", lat); end
      if (gx - ex > 6.0 || ex - gx > 6.0) begin failures++; $display("x %f exp %f ang %0d", gx, ex, ang); end
      if (gy - ey > 6.0 || ey - gy > 6.0) begin failures++; $display("y %f exp %f ang %0d", gy, ey, ang); end
    end
    checks++;
    if (quad[0] == 0 || quad[1] == 0 || quad[2] == 0 || quad[3] == 0) begin failures++; $display("quadrant missed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
