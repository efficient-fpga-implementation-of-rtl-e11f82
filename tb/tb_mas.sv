// tb_mas: random multiply/add/subtract operations against a wide-integer
// reference, including saturation at both ends and the one-cycle latency.
module tb_mas;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mas_op_e op;
  sample_t a, b, y;
  logic [5:0] shift;
  mas #(.W(18)) dut (.clk, .rst_n, .op, .a, .b, .shift, .y);

  function automatic longint expect_y(mas_op_e o, longint x, longint z, int sh);
    longint r;
    case (o)
      MAS_MUL: r = (x * z) >>> sh;
      MAS_ADD: r = x + z;
      default: r = x - z;
    endcase
    if (r > 131071) r = 131071;
    if (r < -131072) r = -131072;
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    int sat_hi = 0, sat_lo = 0;
    op = MAS_ADD; a = '0; b = '0; shift = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      op    = mas_op_e'($urandom_range(0, 2));
      a     = sample_t'($urandom);
      b     = sample_t'($urandom);
      shift = 6'($urandom_range(0, 20));
      e = expect_y(op, longint'(a), longint'(b), int'(shift));
      if (e == 131071) sat_hi++;
      if (e == -131072) sat_lo++;
      @(posedge clk); #1;
      checks++;
      if (longint'(y) != e) begin
        failures++;
        if (failures < 10) $display("op %s a=%0d b=%0d sh=%0d y=%0d exp=%0d", op.name(), a, b, shift, y, e);
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
