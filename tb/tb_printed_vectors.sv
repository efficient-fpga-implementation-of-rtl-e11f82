// tb_printed_vectors: replays the operand values printed for the original
// design's own simulation run through clarke, inv_clarke and svm and compares
// with the results printed for that run.
//   Clarke: six current samples (ia, ib) -> (alpha, beta). alpha must match
//   exactly; beta within 1 LSB (the printed values fit a slightly shorter
//   1/sqrt(3) constant than the Q16 one used here).
//   Inverse Clarke: (5378, 32490) -> (5378, 25454, -30832), b and c within
//   8 LSB (again a shorter sqrt(3)/2 constant in the original).
//   SVM: (5378, 25454, -30832) -> (8067, 28143, -28143) exactly, and
//   (3864, 20065, -23929) -> phase a 5796 exactly with b = -c.
module tb_printed_vectors;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic c_in, c_out, ic_in, ic_out, s_in, s_out;
  abc_t c_abc, ic_abc, s_abc, s_res;
  ab_t  c_ab, ic_ab;
  logic    rq_c, rq_i;
  sample_t a_c, b_c, a_i, b_i, my;
  clarke     u_c  (.clk, .rst_n, .in_valid(c_in), .i_abc(c_abc), .out_valid(c_out), .i_ab(c_ab),
                   .mas_req(rq_c), .mas_a(a_c), .mas_b(b_c), .mas_y(my));
  inv_clarke u_ic (.clk, .rst_n, .in_valid(ic_in), .v_ab(ic_ab), .out_valid(ic_out), .v_abc(ic_abc),
                   .mas_req(rq_i), .mas_a(a_i), .mas_b(b_i), .mas_y(my));
  clarke_mas_share u_m (.clk, .rst_n, .req_c(rq_c), .a_c, .b_c, .req_i(rq_i), .a_i, .b_i, .y(my));
  svm        u_s  (.clk, .rst_n, .in_valid(s_in), .v_abc(s_abc), .out_valid(s_out), .sv_abc(s_res));

  int cia [6] = '{2046, 2045, 2044, 2042, 2040, 2037};
  int cib [6] = '{-996, -968, -939, -911, -882, -853};
  int cbe [6] = '{31, 62, 95, 126, 159, 190};

  function automatic bit near(int got, int exp, int tol);
    return (got - exp <= tol) && (exp - got <= tol);
  endfunction

  task automatic wait_valid(ref logic v);
    int n = 0;
    while (!v && n < 20) begin @(negedge clk); n++; end
    checks++;
    if (!v) begin failures++; $display("no output"); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c_in = 0; ic_in = 0; s_in = 0; c_abc = '0; ic_ab = '0; s_abc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      @(negedge clk);
      c_abc.a = sample_t'(cia[k]); c_abc.b = sample_t'(cib[k]); c_abc.c = sample_t'(-cia[k] - cib[k]);
      c_in = 1;
      @(negedge clk);
      c_in = 0;
      wait_valid(c_out);
      checks += 2;
      if (int'(c_ab.alpha) != cia[k]) begin failures++; $display("alpha %0d", int'(c_ab.alpha)); end
      if (!near(int'(c_ab.beta), cbe[k], 1)) begin failures++; $display("beta %0d exp %0d", int'(c_ab.beta), cbe[k]); end
    end
    @(negedge clk);
    ic_ab.alpha = 18'sd5378; ic_ab.beta = 18'sd32490; ic_in = 1;
    @(negedge clk);
    ic_in = 0;
    wait_valid(ic_out);
    checks += 3;
    if (int'(ic_abc.a) != 5378) begin failures++; $display("inv a %0d", int'(ic_abc.a)); end
    if (!near(int'(ic_abc.b), 25454, 8)) begin failures++; $display("inv b %0d", int'(ic_abc.b)); end
    if (!near(int'(ic_abc.c), -30832, 8)) begin failures++; $display("inv c %0d", int'(ic_abc.c)); end
    @(negedge clk);
    s_abc.a = 18'sd5378; s_abc.b = 18'sd25454; s_abc.c = -18'sd30832; s_in = 1;
    @(negedge clk);
    s_in = 0;
    wait_valid(s_out);
    checks += 3;
    if (int'(s_res.a) != 8067)   begin failures++; $display("sv a %0d", int'(s_res.a)); end
    if (int'(s_res.b) != 28143)  begin failures++; $display("sv b %0d", int'(s_res.b)); end
    if (int'(s_res.c) != -28143) begin failures++; $display("sv c %0d", int'(s_res.c)); end
    @(negedge clk);
    s_abc.a = 18'sd3864; s_abc.b = 18'sd20065; s_abc.c = -18'sd23929; s_in = 1;
    @(negedge clk);
    s_in = 0;
    wait_valid(s_out);
    checks += 2;
    if (int'(s_res.a) != 5796) begin failures++; $display("sv a %0d", int'(s_res.a)); end
    if (int'(s_res.b) != -int'(s_res.c)) begin failures++; $display("sv b/c %0d %0d", int'(s_res.b), int'(s_res.c)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
