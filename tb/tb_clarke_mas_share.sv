// tb_clarke_mas_share: alternates Clarke and inverse-Clarke requests with
// random operands (never both in one cycle) and checks that the product of
// the requesting side, floor(a * b / 2^16) saturated, returns one cycle later.
module tb_clarke_mas_share;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_c, req_i;
  sample_t a_c, b_c, a_i, b_i, y;
  clarke_mas_share dut (.clk, .rst_n, .req_c, .a_c, .b_c, .req_i, .a_i, .b_i, .y);

  function automatic int expect_y(longint a, longint b);
    longint r = (a * b) >>> 16;
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
    int e;
    int nc = 0, ni = 0;
    req_c = 0; req_i = 0; a_c = '0; b_c = '0; a_i = '0; b_i = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      a_c = sample_t'($urandom); b_c = sample_t'($urandom);
      a_i = sample_t'($urandom); b_i = sample_t'($urandom);
      req_c = 0; req_i = 0;
      case ($urandom_range(0, 2))
        0: begin req_c = 1; e = expect_y(longint'(a_c), longint'(b_c)); nc++; end
        1: begin req_i = 1; e = expect_y(longint'(a_i), longint'(b_i)); ni++; end
        default: continue;
      endcase
      @(negedge clk);
      req_c = 0; req_i = 0;
      checks++;
      if (int'(y) != e) begin failures++; $display("y %0d exp %0d", int'(y), e); end
    end
    checks++;
    if (nc == 0 || ni == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
