// tb_foc_top: end-to-end test of the FOC controller at its default parameters
// (72-cycle control period, 100,000-cycle speed window, CORDIC with 18
// iterations), about 4,000 control steps.
//
// Stimulus: the encoder turns clockwise, then counter-clockwise; the ADC
// codes follow a three-phase current set locked to the rotor angle with some
// noise; the speed command steps. The PI channels are preloaded before the
// first step (speed loop with 26247) and once more near the integrator limit
// to provoke anti-windup clamping.
//
// Every control step is followed through the design and checked:
//   - latency tick -> sv_valid of 84 cycles, one step every 72 cycles
//   - the angle used is the encoder count 3 cycles before the tick times 64
//   - Park result against floating-point Park of the exact Clarke result
//   - speed, Id and Iq PI results against an integer PI model fed with the
//     design's own Park outputs (so the loops cannot drift apart)
//   - inverse Park against floating point (5 LSB), inverse Clarke + SVM exactly
// Each mechanism (Park and inverse Park on the shared CORDIC, all four angle
// quadrants, overlap of consecutive steps, the MAS unit shared by Clarke and
// inverse Clarke, speed and current PI steps, PI
// initialisation, integrator clamping, both encoder directions, speed
// updates of both signs, the enable switch) is counted and must occur.
module tb_foc_top;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enable, qa, qb, pi_init;
  logic [11:0] ia, ib, ic;
  sample_t w_ref, pi_init_val;
  pi_ch_e pi_init_ch;
  abc_t sv_abc;
  logic sv_valid, tick, pi_clamped, enc_dir_cw, enc_err;
  angle_t theta;
  sample_t w_act, iq_ref;
  ab_t i_ab, v_ab;
  dq_t i_dq, v_dq;

  foc_top dut (.clk, .rst_n, .enable, .ia, .ib, .ic, .qa, .qb, .w_ref, .pi_init,
    .pi_init_ch, .pi_init_val, .sv_abc, .sv_valid, .tick, .theta, .w_act, .i_ab,
    .i_dq, .v_dq, .v_ab, .iq_ref, .pi_clamped, .enc_dir_cw, .enc_err);

  localparam real PI = 3.14159265358979;
  localparam longint LIM = 131071;

  // ---------------------------------------------------------------- model
  longint integ [3] = '{0, 0, 0};

  function automatic longint sat(longint v, longint hi, longint lo);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic int pi_step(int c, longint r, longint a, output bit clamp);
    longint e, p, i;
    e = sat(r - a, 131071, -131072);
    p = (e * 6400) >>> 16;
    i = integ[c] + e * 100;
    clamp = (i > (LIM <<< 16)) || (i < -(LIM <<< 16));
    i = sat(i, LIM <<< 16, -(LIM <<< 16));
    integ[c] = i;
    return int'(sat(p + (i >>> 16), LIM, -LIM));
  endfunction

  function automatic bit near(real got, real exp, real tol);
    return (got - exp <= tol) && (exp - got <= tol);
  endfunction

  // ---------------------------------------------------------------- cycle count, encoder history
  int cyc = 0;
  int pos = 0;
  int pos_hist [int];
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) pos_hist[cyc] = pos;

  // ---------------------------------------------------------------- mechanism counters
  int n_steps = 0, n_overlap = 0, n_clamp = 0, n_init = 0, n_cw = 0, n_ccw = 0;
  int n_wpos = 0, n_wneg = 0, n_enable_off = 0;
  int n_mas_c = 0, n_mas_i = 0;
  int last_tick = -1;
  int n_quad [4] = '{0, 0, 0, 0};

  // ---------------------------------------------------------------- step records
  typedef struct {
    int t;
    int code [3];
    angle_t th;
    int wact;
    int iqref;
  } step_t;
  step_t q [$];

  always @(negedge clk) if (rst_n) begin
    if (tick) begin
      step_t s;
      if (last_tick >= 0 && $past(enable, 73) && enable) begin
        checks++;
        if (cyc - last_tick != 72) begin failures++; $display("step spacing %0d", cyc - last_tick); end
      end
      last_tick = cyc;
      s.t = cyc;
      s.code[0] = int'(ia); s.code[1] = int'(ib); s.code[2] = int'(ic);
      s.th = '0; s.wact = 0; s.iqref = 0;
      if (q.size() > 0) n_overlap++;
      q.push_back(s);
    end
    foreach (q[k]) begin
      if (cyc - q[k].t == 1) begin
        q[k].th = theta; q[k].wact = int'(w_act);
        checks++;
        if (theta != angle_t'(pos_hist[q[k].t - 3] * 64)) begin
          failures++; $display("theta %0d exp %0d", theta, angle_t'(pos_hist[q[k].t - 3] * 64));
        end
      end
      if (cyc - q[k].t == 20) q[k].iqref = int'(iq_ref);
    end
    if (sv_valid) check_step();
  end

  task automatic check_step();
    step_t s;
    int a, b, al, be, exp_iq, exp_vd, exp_vq, h, m, va, vb, vc, mx, mn, off;
    real th, ed, eq, eal, ebe;
    bit cl1, cl2, cl3;
    if (q.size() == 0) begin failures++; $display("output without step"); return; end
    s = q.pop_front();
    n_steps++;
    checks++;
    if (cyc - s.t != 84) begin failures++; $display("latency %0d", cyc - s.t); end
    n_quad[s.th[17:16]]++;
    // front end and Park
    a  = (s.code[0] - 2048) * 64;
    b  = (s.code[1] - 2048) * 64;
    al = a;
    be = int'((longint'(a + 2 * b) * 37837) >>> 16);
    th = real'(s.th) * 2.0 * PI / 262144.0;
    ed =  real'(al) * $cos(th) + real'(be) * $sin(th);
    eq = -real'(al) * $sin(th) + real'(be) * $cos(th);
    checks += 2;
    if (!near(real'(i_dq.d), ed, 3.0)) begin failures++; $display("Id %0d exp %f", int'(i_dq.d), ed); end
    if (!near(real'(i_dq.q), eq, 3.0)) begin failures++; $display("Iq %0d exp %f", int'(i_dq.q), eq); end
    // PI loops
    exp_iq = pi_step(0, longint'(w_ref_at(s.t)), longint'(s.wact), cl1);
    exp_vd = pi_step(1, 0, longint'(i_dq.d), cl2);
    exp_vq = pi_step(2, longint'(exp_iq), longint'(i_dq.q), cl3);
    if (cl1 || cl2 || cl3) n_clamp++;
    checks += 3;
    if (s.iqref != exp_iq) begin failures++; $display("speed PI %0d exp %0d", s.iqref, exp_iq); end
    if (int'(v_dq.d) != exp_vd) begin failures++; $display("Vd %0d exp %0d", int'(v_dq.d), exp_vd); end
    if (int'(v_dq.q) != exp_vq) begin failures++; $display("Vq %0d exp %0d", int'(v_dq.q), exp_vq); end
    // inverse Park
    eal = real'(v_dq.d) * $cos(th) - real'(v_dq.q) * $sin(th);
    ebe = real'(v_dq.d) * $sin(th) + real'(v_dq.q) * $cos(th);
    checks += 2;
    if (!near(real'(v_ab.alpha), eal, 5.0) && !(eal > 131071.0 && v_ab.alpha == 131071) &&
        !(eal < -131072.0 && v_ab.alpha == -131072)) begin
      failures++; $display("Valpha %0d exp %f", int'(v_ab.alpha), eal);
    end
    if (!near(real'(v_ab.beta), ebe, 5.0) && !(ebe > 131071.0 && v_ab.beta == 131071) &&
        !(ebe < -131072.0 && v_ab.beta == -131072)) begin
      failures++; $display("Vbeta %0d exp %f", int'(v_ab.beta), ebe);
    end
    // inverse Clarke and SVM, exact
    m  = int'((longint'(v_ab.beta) * 56756) >>> 16);
    h  = int'(v_ab.alpha) >>> 1;
    va = int'(v_ab.alpha);
    vb = int'(sat(longint'(m - h), 131071, -131072));
    vc = int'(sat(longint'(-m - h), 131071, -131072));
    mx = va; mn = va;
    if (vb > mx) mx = vb;
    if (vc > mx) mx = vc;
    if (vb < mn) mn = vb;
    if (vc < mn) mn = vc;
    off = (mx + mn) >>> 1;
    checks += 3;
    if (int'(sv_now_a()) != int'(sat(longint'(va - off), 131071, -131072))) begin failures++; $display("SVa %0d exp %0d", int'(sv_now_a()), va - off); end
    if (int'(sv_now_b()) != int'(sat(longint'(vb - off), 131071, -131072))) begin failures++; $display("SVb"); end
    if (int'(sv_now_c()) != int'(sat(longint'(vc - off), 131071, -131072))) begin failures++; $display("SVc"); end
  endtask

  // sv_abc is registered: the value of a step shows one cycle after sv_valid,
  // so the checker reads the SVM output through the design hierarchy.
  function automatic sample_t sv_now_a(); return dut.sv_now.a; endfunction
  function automatic sample_t sv_now_b(); return dut.sv_now.b; endfunction
  function automatic sample_t sv_now_c(); return dut.sv_now.c; endfunction

  // w_ref history (the speed PI reads w_ref in the tick cycle)
  int wref_hist [int];
  always @(negedge clk) wref_hist[cyc] = int'(w_ref);
  function automatic int w_ref_at(int t); return wref_hist[t]; endfunction

  // held output must follow one cycle later
  always @(negedge clk) if (rst_n && $past(sv_valid)) begin
    checks++;
    if (sv_abc != $past(dut.sv_now)) begin failures++; $display("sv_abc not held"); end
  end

  // ---------------------------------------------------------------- stimulus
  // encoder: one step every enc_period cycles in direction enc_cw
  int enc_period = 61;
  bit enc_cw = 1;
  initial begin
    qa = 0; qb = 0;
    forever begin
      repeat (enc_period) @(negedge clk);
      if (enc_cw) {qa, qb} = ({qa, qb} == 2'b00) ? 2'b10 : ({qa, qb} == 2'b10) ? 2'b11 :
                             ({qa, qb} == 2'b11) ? 2'b01 : 2'b00;
      else        {qa, qb} = ({qa, qb} == 2'b00) ? 2'b01 : ({qa, qb} == 2'b01) ? 2'b11 :
                             ({qa, qb} == 2'b11) ? 2'b10 : 2'b00;
      pos += enc_cw ? 1 : -1;
    end
  end

  // currents locked to the rotor angle, leading by 90 degrees, with noise
  always @(negedge clk) begin
    real ph;
    int ca, cb;
    ph = real'(pos) * 64.0 * 2.0 * PI / 262144.0 + PI / 2.0;
    ca = 2048 + int'(900.0 * $cos(ph)) + $urandom_range(0, 8) - 4;
    cb = 2048 + int'(900.0 * $cos(ph - 2.0 * PI / 3.0)) + $urandom_range(0, 8) - 4;
    ia = 12'(ca); ib = 12'(cb); ic = 12'(3 * 2048 - ca - cb);
  end

  always @(negedge clk) if (rst_n) begin
    if (enc_dir_cw) n_cw++; else n_ccw++;
    if (w_act > 0) n_wpos++;
    if (w_act < 0) n_wneg++;
    if (!enable) n_enable_off++;
    if (dut.cm_req_c) n_mas_c++;
    if (dut.cm_req_i) n_mas_i++;
    if (enc_err) begin failures++; $display("encoder error"); end
  end

  task automatic init_channel(pi_ch_e c, int v);
    @(negedge clk);
    pi_init = 1; pi_init_ch = c; pi_init_val = sample_t'(v);
    @(negedge clk);
    pi_init = 0;
    integ[c] = longint'(v) <<< 16;
    n_init++;
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 0; w_ref = '0; pi_init = 0; pi_init_ch = PI_SPEED; pi_init_val = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    init_channel(PI_SPEED, 26247);
    init_channel(PI_ID, 0);
    init_channel(PI_IQ, 0);
    @(negedge clk);
    w_ref = 18'sd6551;
    enable = 1;
    repeat (110000) @(negedge clk);
    w_ref = 18'sd32768;
    repeat (60000) @(negedge clk);
    // stop, preload the speed integrator near its limit, restart
    enable = 0;
    repeat (120) @(negedge clk);
    init_channel(PI_SPEED, 131000);
    w_ref = 18'sd131071;
    enable = 1;
    repeat (30000) @(negedge clk);
    enc_cw = 0; enc_period = 150;
    w_ref = -18'sd13107;
    repeat (210000) @(negedge clk);
    enable = 0;
    repeat (200) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("steps left in flight"); end
    $display("shared MAS uses: Clarke %0d, inverse Clarke %0d", n_mas_c, n_mas_i);
    $display("steps %0d overlap %0d clamp %0d init %0d cw %0d ccw %0d w+ %0d w- %0d off %0d quad %0d/%0d/%0d/%0d",
             n_steps, n_overlap, n_clamp, n_init, n_cw, n_ccw, n_wpos, n_wneg, n_enable_off,
             n_quad[0], n_quad[1], n_quad[2], n_quad[3]);
    checks += 10;
    if (n_mas_c == 0 || n_mas_i == 0) begin failures++; $display("shared Clarke MAS not used by both"); end
    if (n_steps < 1000)  begin failures++; $display("too few steps"); end
    if (n_overlap == 0)  begin failures++; $display("no overlapping steps"); end
    if (n_clamp == 0)    begin failures++; $display("no anti-windup clamp"); end
    if (n_init == 0)     begin failures++; $display("no PI init"); end
    if (n_cw == 0 || n_ccw == 0) begin failures++; $display("encoder direction missed"); end
    if (n_wpos == 0 || n_wneg == 0) begin failures++; $display("speed sign missed"); end
    if (n_enable_off == 0) begin failures++; $display("enable switch missed"); end
    if (n_quad[0] == 0 || n_quad[1] == 0 || n_quad[2] == 0 || n_quad[3] == 0) begin
      failures++; $display("angle quadrant missed");
    end
    if (pos_hist.size() == 0) begin failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
