// inv_clarke: inverse Clarke transform of a stationary-frame voltage vector
// into three phase voltages:
//   a = alpha
//   b = -alpha/2 + (sqrt(3)/2) beta
//   c = -alpha/2 - (sqrt(3)/2) beta
// alpha/2 is an arithmetic shift; (sqrt(3)/2) beta is one MAS multiplication
// by round(2^16 * sqrt(3)/2) and a 16-bit shift. Outputs saturate to 18 bits.
//
// Four-stage pipeline, one vector per cycle: `in_valid` with `v_ab` in cycle n
// gives `out_valid` with `v_abc` in cycle n+4.
//   stage 1 register inputs, stage 2 MAS multiply and halve alpha,
//   stage 3 add and subtract, stage 4 saturate into the output register.
// The MAS unit is outside the module so that it can be shared with clarke:
// in cycle n+1 the module raises `mas_req` and presents the operands; it
// reads the product on `mas_y` in cycle n+2.
// The equations, the MAS use and the 4-cycle latency follow the design; the
// stage split and the MAS port are this implementation's.
module inv_clarke (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  foc_pkg::ab_t   v_ab,
  output logic           out_valid,
  output foc_pkg::abc_t  v_abc,
  // shared MAS unit
  output logic             mas_req,
  output foc_pkg::sample_t mas_a,
  output foc_pkg::sample_t mas_b,
  input  foc_pkg::sample_t mas_y
);
  import foc_pkg::*;

  logic [3:0] v;
  sample_t al1, be1, al2, half2, m2;
  logic signed [19:0] a3, b3, c3;

  // MAS_MUL with shift 16
  assign mas_req = v[0];
  assign mas_a   = be1;
  assign mas_b   = SQRT3_2;
  assign m2      = mas_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
      al1 <= '0; be1 <= '0; al2 <= '0; half2 <= '0;
      a3 <= '0; b3 <= '0; c3 <= '0;
      v_abc <= '0;
    end else begin
      v     <= {v[2:0], in_valid};
      al1   <= v_ab.alpha;                                 // stage 1
      be1   <= v_ab.beta;
      al2   <= al1;                                        // stage 2 (MAS)
      half2 <= al1 >>> 1;
      a3    <= 20'(al2);                                   // stage 3
      b3    <= 20'(m2) - 20'(half2);
      c3    <= -20'(m2) - 20'(half2);
      v_abc.a <= sat18(48'(a3));                           // stage 4
      v_abc.b <= sat18(48'(b3));
      v_abc.c <= sat18(48'(c3));
    end
  end

  assign out_valid = v[3];

endmodule
