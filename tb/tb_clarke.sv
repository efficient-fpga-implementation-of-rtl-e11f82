// tb_clarke: streams balanced three-phase samples, one per cycle, and checks
// alpha = a and beta = floor((a + 2b) * 37837 / 2^16), the 4-cycle latency,
// and that beta is within two steps of (a + 2b)/sqrt(3).
module tb_clarke;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  abc_t i_abc;
  ab_t  i_ab;
  logic mas_req;
  sample_t mas_a, mas_b, mas_y;
  clarke dut (.clk, .rst_n, .in_valid, .i_abc, .out_valid, .i_ab,
    .mas_req, .mas_a, .mas_b, .mas_y);
  mas #(.W(18)) u_mas (.clk, .rst_n, .op(MAS_MUL), .a(mas_a), .b(mas_b), .shift(6'd16), .y(mas_y));

  localparam int N = 400;
  int ea [N], eb [N];
  real rb [N];
  int sent = 0, got = 0;
  int cyc = 0, t_in [N];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(negedge clk) if (rst_n && out_valid) begin
    checks += 3;
    if (cyc - t_in[got] != 4) begin failures++; $display("latency %0d", cyc - t_in[got]); end
    if (int'(i_ab.alpha) != ea[got]) begin failures++; $display("alpha %0d exp %0d", i_ab.alpha, ea[got]); end
    if (int'(i_ab.beta) != eb[got] || (real'(i_ab.beta) - rb[got] > 2.0 || rb[got] - real'(i_ab.beta) > 2.0)) begin
      failures++; $display("beta %0d exp %0d", int'(i_ab.beta), eb[got]);
    end
    got++;
  end

  initial begin
    int a, b, c;
    longint s;
    in_valid = 0; i_abc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (sent < N) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin in_valid = 0; i_abc = abc_t'({$urandom, $urandom}); continue; end
      a = $urandom_range(0, 80000) - 40000;
      b = $urandom_range(0, 80000) - 40000;
      c = -a - b;
      i_abc.a = sample_t'(a); i_abc.b = sample_t'(b); i_abc.c = sample_t'(c);
      in_valid = 1;
      ea[sent] = a;
      s = longint'(a + 2 * b) * 37837;
      eb[sent] = int'(s >>> 16);
      rb[sent] = real'(a + 2 * b) / $sqrt(3.0);
      t_in[sent] = cyc;
      sent++;
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (got != N) begin failures++; $display("got %0d of %0d", got, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
