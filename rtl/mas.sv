// mas: multiply / add / subtract unit, the shared arithmetic element of the
// FOC datapath.
//
// One operation per cycle, chosen by `op`:
//   MAS_MUL  y = sat((a * b) >>> shift)   (shift = fraction bits of b)
//   MAS_ADD  y = sat(a + b)
//   MAS_SUB  y = sat(a - b)
// The result is registered: operands presented in cycle n give `y` in cycle
// n+1. Results saturate to the W-bit signed range instead of wrapping. The
// three operations and their use for every multiply, add and divide-by-constant
// follow the design; the runtime shift input, the saturation and the
// one-cycle latency are choices of this implementation.
module mas #(
  parameter int W = 18                  // operand and result width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  foc_pkg::mas_op_e    op,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic        [5:0]   shift,
  output logic signed [W-1:0] y
);
  import foc_pkg::*;

  localparam logic signed [2*W:0] MAXV = (2*W+1)'(2**(W-1) - 1);
  localparam logic signed [2*W:0] MINV = -(2*W+1)'(2**(W-1));

  logic signed [2*W:0] wide;

  always_comb begin
    unique case (op)
      MAS_MUL: wide = (2*W+1)'((a * b) >>> shift);
      MAS_ADD: wide = (2*W+1)'(a) + (2*W+1)'(b);
      MAS_SUB: wide = (2*W+1)'(a) - (2*W+1)'(b);
      default: wide = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            y <= '0;
    else if (wide > MAXV)  y <= MAXV[W-1:0];
    else if (wide < MINV)  y <= MINV[W-1:0];
    else                   y <= wide[W-1:0];
  end

endmodule
