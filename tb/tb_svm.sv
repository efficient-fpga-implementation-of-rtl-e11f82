// tb_svm: streams three-phase references and checks each output against
// V - floor((max + min)/2), the 3-cycle latency, and that the modulated
// references are centred (their max and min sum to 0 or -1).
module tb_svm;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  abc_t v_abc, sv_abc;
  svm dut (.clk, .rst_n, .in_valid, .v_abc, .out_valid, .sv_abc);

  localparam int N = 400;
  int e [N][3];
  int sent = 0, got = 0;
  int cyc = 0, t_in [N];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int mx, mn;
    checks += 5;
    if (cyc - t_in[got] != 3) begin failures++; $display("latency %0d", cyc - t_in[got]); end
    if (int'(sv_abc.a) != e[got][0]) begin failures++; $display("a %0d exp %0d", sv_abc.a, e[got][0]); end
    if (int'(sv_abc.b) != e[got][1]) begin failures++; $display("b %0d exp %0d", sv_abc.b, e[got][1]); end
    if (int'(sv_abc.c) != e[got][2]) begin failures++; $display("c %0d exp %0d", sv_abc.c, e[got][2]); end
    mx = int'(sv_abc.a); mn = int'(sv_abc.a);
    if (int'(sv_abc.b) > mx) mx = int'(sv_abc.b);
    if (int'(sv_abc.c) > mx) mx = int'(sv_abc.c);
    if (int'(sv_abc.b) < mn) mn = int'(sv_abc.b);
    if (int'(sv_abc.c) < mn) mn = int'(sv_abc.c);
    if (mx + mn != 0 && mx + mn != 1) begin failures++; $display("not centred %0d %0d", mx, mn); end
    got++;
  end

  initial begin
    int v [3];
    int mx, mn, off;
    in_valid = 0; v_abc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (sent < N) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin in_valid = 0; continue; end
      // a balanced set from a random angle and amplitude, or any three values
      if (sent % 2 == 0) begin
        real th, amp;
        th  = real'($urandom_range(0, 3599)) * 3.14159265358979 / 1800.0;
        amp = real'($urandom_range(0, 60000));
        v[0] = int'(amp * $cos(th));
        v[1] = int'(amp * $cos(th - 2.0943951023932));
        v[2] = -v[0] - v[1];
      end else begin
        for (int k = 0; k < 3; k++) v[k] = $urandom_range(0, 120000) - 60000;
      end
      mx = v[0]; mn = v[0];
      for (int k = 1; k < 3; k++) begin
        if (v[k] > mx) mx = v[k];
        if (v[k] < mn) mn = v[k];
      end
      off = (mx + mn) >>> 1;
      for (int k = 0; k < 3; k++) e[sent][k] = v[k] - off;
      v_abc.a = sample_t'(v[0]); v_abc.b = sample_t'(v[1]); v_abc.c = sample_t'(v[2]);
      in_valid = 1;
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
