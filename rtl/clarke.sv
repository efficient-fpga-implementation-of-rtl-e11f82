// clarke: Clarke transform of three phase currents into the stationary
// alpha-beta frame, using a + b + c = 0:
//   alpha = a,   beta = (a + 2b) / sqrt(3)
// (c is not needed). The division is a multiplication by round(2^16/sqrt(3))
// in a MAS unit followed by a 16-bit arithmetic shift, so results round toward
// minus infinity.
//
// Four-stage pipeline, one sample per cycle: `in_valid` with `i_abc` in cycle n
// gives `out_valid` with `i_ab` in cycle n+4.
//   stage 1 register inputs, stage 2 a + 2b (shift and add),
//   stage 3 MAS multiply, stage 4 output register.
// The MAS unit is outside the module so that it can be shared with
// inv_clarke: in cycle n+2 the module raises `mas_req` and presents the
// operands; it reads the product on `mas_y` in cycle n+3.
// The equations, the MAS use, the pipelining and the 4-cycle latency follow
// the design; the stage split and the MAS port are this implementation's.
module clarke (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  foc_pkg::abc_t  i_abc,
  output logic           out_valid,
  output foc_pkg::ab_t   i_ab,
  // shared MAS unit
  output logic             mas_req,
  output foc_pkg::sample_t mas_a,
  output foc_pkg::sample_t mas_b,
  input  foc_pkg::sample_t mas_y
);
  import foc_pkg::*;

  logic [3:0] v;
  sample_t a1, b1, a2, a3, s2, prod;

  // MAS_MUL with shift 16
  assign mas_req = v[1];
  assign mas_a   = s2;
  assign mas_b   = INV_SQRT3;
  assign prod    = mas_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
      a1 <= '0; b1 <= '0; a2 <= '0; a3 <= '0; s2 <= '0;
      i_ab <= '0;
    end else begin
      v  <= {v[2:0], in_valid};
      a1 <= i_abc.a;                                       // stage 1
      b1 <= i_abc.b;
      a2 <= a1;                                            // stage 2
      s2 <= sat18(48'(a1) + 48'(b1) + 48'(b1));
      a3 <= a2;                                            // stage 3 (MAS)
      i_ab.alpha <= a3;                                    // stage 4
      i_ab.beta  <= prod;
    end
  end

  assign out_valid = v[3];

endmodule
