// tb_adc_scaler: random 12-bit codes; checks (code - 2048) * 64 for all three
// phases and that `done` comes exactly 5 cycles after `start`.
module tb_adc_scaler;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, done, busy;
  logic [11:0] ia, ib, ic;
  abc_t i_abc;
  adc_scaler dut (.clk, .rst_n, .start, .ia, .ib, .ic, .done, .i_abc, .busy);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    int ea, eb, ec;
    start = 0; ia = 0; ib = 0; ic = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      ia = 12'($urandom); ib = 12'($urandom); ic = 12'($urandom);
      if (n == 0) begin ia = 12'd0; ib = 12'd4095; ic = 12'd2048; end
      ea = (int'(ia) - 2048) * 64; eb = (int'(ib) - 2048) * 64; ec = (int'(ic) - 2048) * 64;
      start = 1;
      @(negedge clk);
      start = 0;
      ia = 12'($urandom); ib = 12'($urandom); ic = 12'($urandom);  // must not matter
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks += 4;
      if (lat != 5) begin failures++; $display("latency %0d", lat); end
      if (int'(i_abc.a) != ea) begin failures++; $display("a %0d exp %0d", i_abc.a, ea); end
      if (int'(i_abc.b) != eb) begin failures++; $display("b %0d exp %0d", i_abc.b, eb); end
      if (int'(i_abc.c) != ec) begin failures++; $display("c %0d exp %0d", i_abc.c, ec); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
