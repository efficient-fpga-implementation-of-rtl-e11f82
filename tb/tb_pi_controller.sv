// tb_pi_controller: random PI steps on the three channels against an integer
// model of E = ref - act, P = Kp E, I += Ki E (clamped), Y = P + I (limited),
// with Q16 gains Kp = 6400 and Ki = 100. Also checks the 11-cycle latency, the
// initialisation of a channel, channel independence and that the
// anti-windup clamp engages at both limits.
module tb_pi_controller;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, init, done, clamped, busy;
  pi_ch_e ch, init_ch, y_ch;
  sample_t ref_in, act_in, init_val, y;
  pi_controller dut (.clk, .rst_n, .start, .ch, .ref_in, .act_in, .init, .init_ch,
                     .init_val, .done, .y_ch, .y, .clamped, .busy);

  localparam longint LIM = 131071;
  longint integ [3] = '{0, 0, 0};
  int n_clamp_hi = 0, n_clamp_lo = 0;

  function automatic longint sat(longint v, longint hi, longint lo);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input pi_ch_e c, input int r, input int a);
    longint e, p, i, yy;
    int lat;
    logic ec;
    e  = sat(longint'(r) - longint'(a), 131071, -131072);
    p  = (e * 6400) >>> 16;
    i  = integ[c] + e * 100;
    ec = (i > (LIM <<< 16)) || (i < -(LIM <<< 16));
    if (i > (LIM <<< 16)) n_clamp_hi++;
    if (i < -(LIM <<< 16)) n_clamp_lo++;
    i  = sat(i, LIM <<< 16, -(LIM <<< 16));
    integ[c] = i;
    yy = sat(p + (i >>> 16), LIM, -LIM);
    @(negedge clk);
    start = 1; ch = c; ref_in = sample_t'(r); act_in = sample_t'(a);
    @(negedge clk);
    start = 0; ref_in = sample_t'($urandom); act_in = sample_t'($urandom);
    lat = 1;
    while (!done && lat < 50) begin @(negedge clk); lat++; end
    checks += 4;
    if (lat != 11) begin failures++; $display("latency %0d", lat); end
    if (y_ch != c) begin failures++; $display("channel"); end
    if (longint'(y) != yy) begin failures++; $display("ch %0d y %0d exp %0d", c, y, yy); end
    if (clamped != ec) begin failures++; $display("clamp flag"); end
  endtask

  task automatic do_init(input pi_ch_e c, input int v);
    @(negedge clk);
    init = 1; init_ch = c; init_val = sample_t'(v);
    @(negedge clk);
    init = 0;
    integ[c] = longint'(v) <<< 16;
  endtask

  initial begin
    start = 0; init = 0; ch = PI_SPEED; init_ch = PI_SPEED; ref_in = '0; act_in = '0; init_val = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // after init with zero error the output equals the initial value
    do_init(PI_SPEED, 26247);
    step(PI_SPEED, 500, 500);
    checks++;
    if (int'(y) != 26247) begin failures++; $display("init value not held: %0d", y); end
    // random steps on all channels
    for (int n = 0; n < 600; n++)
      step(pi_ch_e'($urandom_range(0, 2)), $urandom_range(0, 100000) - 50000,
           $urandom_range(0, 100000) - 50000);
    // drive into both integrator limits
    do_init(PI_ID, 131000);
    for (int n = 0; n < 5; n++) step(PI_ID, 131071, -131072);
    do_init(PI_IQ, -131000);
    for (int n = 0; n < 5; n++) step(PI_IQ, -131072, 131071);
    checks++;
    if (n_clamp_hi == 0 || n_clamp_lo == 0) begin failures++; $display("clamp not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
