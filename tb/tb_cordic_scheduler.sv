// tb_cordic_scheduler: Park and inverse Park requests in random order.
// Park must give d = a cos + b sin, q = -a sin + b cos; inverse Park
// alpha = d cos - q sin, beta = d sin + q cos (floating-point reference,
// 5 LSB tolerance). Checks the 23-cycle latency, the reported mode, and that
// a Park followed by an inverse Park returns the original vector.
module tb_cordic_scheduler;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start_park, start_ipark, done, busy;
  ab_t i_ab;
  dq_t v_dq;
  angle_t theta;
  cordic_mode_e mode;
  logic signed [35:0] res;
  cordic_scheduler dut (.clk, .rst_n, .start_park, .start_ipark, .i_ab, .v_dq,
                        .theta, .done, .mode, .res, .busy);

  localparam real PI = 3.14159265358979;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic ipark, input int x, input int y, input angle_t a,
                     output int rx, output int ry);
    int lat;
    real th, ex, ey;
    th = real'(a) * 2.0 * PI / 262144.0;
    if (!ipark) begin
      ex =  real'(x) * $cos(th) + real'(y) * $sin(th);
      ey = -real'(x) * $sin(th) + real'(y) * $cos(th);
    end else begin
      ex = real'(x) * $cos(th) - real'(y) * $sin(th);
      ey = real'(x) * $sin(th) + real'(y) * $cos(th);
    end
    @(negedge clk);
    theta = a;
    if (ipark) begin v_dq.d = sample_t'(x); v_dq.q = sample_t'(y); i_ab = ab_t'($urandom); start_ipark = 1; end
    else       begin i_ab.alpha = sample_t'(x); i_ab.beta = sample_t'(y); v_dq = dq_t'($urandom); start_park = 1; end
    @(negedge clk);
    start_park = 0; start_ipark = 0;
    theta = angle_t'($urandom); i_ab = ab_t'($urandom); v_dq = dq_t'($urandom);
    lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    rx = int'($signed(res[35:18]));
    ry = int'($signed(res[17:0]));
    checks += 4;
    if (lat != 23) begin failures++; $display("latency %0d", lat); end
    if (mode != (ipark ? CORDIC_IPARK : CORDIC_PARK)) begin failures++; $display("mode"); end
    if (real'(rx) - ex > 5.0 || ex - real'(rx) > 5.0) begin failures++; $display("x %0d exp %f", rx, ex); end
    if (real'(ry) - ey > 5.0 || ey - real'(ry) > 5.0) begin failures++; $display("y %0d exp %f", ry, ey); end
  endtask

  initial begin
    int x, y, d, q, a2, b2;
    angle_t a;
    start_park = 0; start_ipark = 0; i_ab = '0; v_dq = '0; theta = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      x = $urandom_range(0, 160000) - 80000;
      y = $urandom_range(0, 160000) - 80000;
      a = angle_t'($urandom);
      run(1'b0, x, y, a, d, q);
      run(1'b1, d, q, a, a2, b2);
      checks++;
      if (a2 - x > 6 || x - a2 > 6 || b2 - y > 6 || y - b2 > 6) begin
        failures++; $display("round trip (%0d,%0d) -> (%0d,%0d)", x, y, a2, b2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
