// encoder_if: incremental (quadrature) encoder interface. Produces the
// electrical rotor angle theta and the rotor speed W as 18-bit words.
//
// The A and B channels pass a two-flop synchroniser. Every edge of either
// channel is one count (x4 decoding); the direction follows from which channel
// leads: A leading B (B lagging) is clockwise and counts up, B leading A counts
// down. A step where both channels change at once is invalid and ignored.
// theta moves by ANGLE_FACTOR per count and wraps at 2^18 (one electrical
// turn); with the default 64 a 4096-count-per-turn encoder on a one-pole-pair
// machine fills the 18-bit range. W is the signed count collected over
// SPEED_WINDOW clock cycles times SPEED_FACTOR, saturated; it is updated once
// per window.
//
// Timing: an edge on qa/qb before the clock edge that ends cycle 0 shows in
// theta in cycle 3 (two synchroniser stages and the counter). Timing of W:
// updated in the cycle after each window closes.
// The quadrature decoding, direction rule, angle/speed scaling factors and the
// 3-cycle latency follow the design; the factor values, the window and the
// synchroniser are this implementation's, since the encoder resolution is left
// open.
module encoder_if #(
  parameter logic [17:0] ANGLE_FACTOR = 18'd64,      // theta step per count
  parameter logic [17:0] SPEED_FACTOR = 18'd64,      // W per count per window
  parameter int          SPEED_WINDOW = 100_000      // clock cycles per W update
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              qa,
  input  logic              qb,
  output foc_pkg::angle_t   theta,
  output foc_pkg::sample_t  w,
  output logic              w_valid,   // pulse when w is updated
  output logic              dir_cw,    // last counted step was clockwise
  output logic              err        // pulse on an invalid double step
);
  import foc_pkg::*;

  logic [1:0] s1, s2, s3;              // {A, B} synchroniser and previous
  logic up, dn;
  logic signed [23:0] step;
  logic signed [23:0] delta;
  logic [$clog2(SPEED_WINDOW+1)-1:0] wcnt;

  // Count up on A-leads-B steps 00->10->11->01->00, down on the reverse.
  always_comb begin
    up = 1'b0; dn = 1'b0;
    unique case ({s3, s2})
      4'b00_10, 4'b10_11, 4'b11_01, 4'b01_00: up = 1'b1;
      4'b00_01, 4'b01_11, 4'b11_10, 4'b10_00: dn = 1'b1;
      default: ;
    endcase
    step = up ? 24'sd1 : dn ? -24'sd1 : 24'sd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
      theta <= '0; w <= '0; w_valid <= 1'b0; dir_cw <= 1'b1; err <= 1'b0;
      delta <= '0; wcnt <= '0;
    end else begin
      s1 <= {qa, qb};
      s2 <= s1;
      s3 <= s2;
      err <= (s3 != s2) && !up && !dn;
      if (up) begin theta <= theta + ANGLE_FACTOR; dir_cw <= 1'b1; end
      if (dn) begin theta <= theta - ANGLE_FACTOR; dir_cw <= 1'b0; end
      w_valid <= 1'b0;
      if (wcnt == ($bits(wcnt))'(SPEED_WINDOW - 1)) begin
        wcnt    <= '0;
        w       <= sat18(48'(delta + step) *
                         48'($signed({1'b0, SPEED_FACTOR})));
        w_valid <= 1'b1;
        delta   <= '0;
      end else begin
        wcnt  <= wcnt + 1'b1;
        delta <= delta + step;
      end
    end
  end

endmodule
