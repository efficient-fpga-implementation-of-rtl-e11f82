// cordic_scale: removes the CORDIC gain. Both raw CORDIC outputs are
// multiplied by K = prod(1/sqrt(1 + 2^-2i)) = 0.607253 in one MAS unit, one
// after the other: the product with round(K * 2^18) = 159188 is shifted right
// by 20, which also drops the two guard fraction bits of the raw outputs.
// Results saturate to 18 bits.
//
// Timing: `start` in cycle 0 with `xi`, `yi` (held by the producer) gives
// `done` in cycle 3 with `xo`, `yo` valid and held:
//   cycle 0 multiply x, cycle 1 multiply y, cycle 2 both into the output
//   register.
// Removing the gain with a MAS multiplier follows the design; the constant
// width and the schedule are this implementation's.
module cordic_scale (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic signed [22:0] xi,
  input  logic signed [22:0] yi,
  output logic               done,
  output foc_pkg::sample_t   xo,
  output foc_pkg::sample_t   yo
);
  import foc_pkg::*;

  localparam logic signed [22:0] K_Q18 = 23'sd159188;

  logic [1:0] ph;            // one-hot phase
  logic signed [22:0] m_a, m_y, xs;

  assign m_a = ph[0] ? yi : xi;

  mas #(.W(23)) u_mas (.clk, .rst_n, .op(MAS_MUL), .a(m_a), .b(K_Q18),
                       .shift(6'd20), .y(m_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= '0; done <= 1'b0; xs <= '0; xo <= '0; yo <= '0;
    end else begin
      ph   <= {ph[0], start};
      done <= ph[1];
      if (ph[0]) xs <= m_y;
      if (ph[1]) begin
        xo <= sat18(48'(xs));
        yo <= sat18(48'(m_y));
      end
    end
  end

endmodule
