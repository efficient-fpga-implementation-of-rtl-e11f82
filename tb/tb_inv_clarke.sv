// tb_inv_clarke: streams alpha/beta vectors, one per cycle, and checks
// a = alpha, b = m - floor(alpha/2), c = -m - floor(alpha/2) with
// m = floor(beta * 56756 / 2^16), saturated, plus the 4-cycle latency and that
// a + b + c stays within rounding of zero.
module tb_inv_clarke;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  ab_t  v_ab;
  abc_t v_abc;
  logic mas_req;
  sample_t mas_a, mas_b, mas_y;
  inv_clarke dut (.clk, .rst_n, .in_valid, .v_ab, .out_valid, .v_abc,
    .mas_req, .mas_a, .mas_b, .mas_y);
  mas #(.W(18)) u_mas (.clk, .rst_n, .op(MAS_MUL), .a(mas_a), .b(mas_b), .shift(6'd16), .y(mas_y));

  localparam int N = 400;
  int ea [N], eb [N], ec [N];
  int sent = 0, got = 0, nsat = 0;
  int cyc = 0, t_in [N];

  function automatic int sat(longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return int'(v);
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    checks += 4;
    if (cyc - t_in[got] != 4) begin failures++; $display("latency %0d", cyc - t_in[got]); end
    if (int'(v_abc.a) != ea[got]) begin failures++; $display("a %0d exp %0d", v_abc.a, ea[got]); end
    if (int'(v_abc.b) != eb[got]) begin failures++; $display("b %0d exp %0d", v_abc.b, eb[got]); end
    if (int'(v_abc.c) != ec[got]) begin failures++; $display("c %0d exp %0d", v_abc.c, ec[got]); end
    got++;
  end

  initial begin
    int al, be, h;
    longint m;
    in_valid = 0; v_ab = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (sent < N) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin in_valid = 0; v_ab = ab_t'($urandom); continue; end
      al = $urandom_range(0, 262143) - 131072;
      be = $urandom_range(0, 262143) - 131072;
      v_ab.alpha = sample_t'(al); v_ab.beta = sample_t'(be);
      in_valid = 1;
      m = (longint'(be) * 56756) >>> 16;
      h = al >>> 1;
      ea[sent] = al;
      eb[sent] = sat(m - h);
      ec[sent] = sat(-m - h);
      if (eb[sent] != int'(m - h) || ec[sent] != int'(-m - h)) nsat++;
      t_in[sent] = cyc;
      sent++;
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks += 2;
    if (got != N) begin failures++; $display("got %0d of %0d", got, N); end
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
