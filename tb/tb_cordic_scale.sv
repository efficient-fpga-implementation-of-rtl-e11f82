// tb_cordic_scale: random raw CORDIC outputs; checks
// sat(floor(v * 159188 / 2^20)) for both outputs and the 3-cycle latency.
module tb_cordic_scale;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, done;
  logic signed [22:0] xi, yi;
  sample_t xo, yo;
  cordic_scale dut (.clk, .rst_n, .start, .xi, .yi, .done, .xo, .yo);

  function automatic int expect_v(longint v);
    longint r = (v * 159188) >>> 20;
    if (r > 131071) r = 131071;
    if (r < -131072) r = -131072;
    return int'(r);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, ex, ey;
    start = 0; xi = '0; yi = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      xi = 23'($urandom); yi = 23'($urandom);
      ex = expect_v(longint'(xi)); ey = expect_v(longint'(yi));
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 50) begin @(negedge clk); lat++; end
      checks += 3;
      if (lat != 3) begin failures++; $display("latency %0d", lat); end
      if (int'(xo) != ex) begin failures++; $display("x %0d exp %0d", xo, ex); end
      if (int'(yo) != ey) begin failures++; $display("y %0d exp %0d", yo, ey); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
