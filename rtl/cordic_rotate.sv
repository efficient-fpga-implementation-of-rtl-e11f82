// cordic_rotate: iterative rotation-mode CORDIC. Rotates the vector (x, y) by
// the angle `ang` (unsigned, 2^18 = one turn) without multipliers, using only
// shifts, adds and a table of arctangents.
//
// How it works: a pre-rotation by 180 degrees (negate x and y, subtract half a
// turn from the angle) brings the residual angle into [-90, +90) degrees,
// inside the CORDIC convergence range of about +/-99.7 degrees. Then ITER
// micro-rotations follow, one per cycle: in step i the vector is turned by
// +/-atan(2^-i) towards the residual angle, which is kept with GUARD extra
// fraction bits. The result is the rotated vector multiplied by the CORDIC gain
// 1/K = 1.6468; cordic_scale removes that gain. x and y carry two extra
// fraction bits and enough integer headroom (IW = 18 + 3 + 2 bits) that no
// step can overflow.
//
// Arctangent table: ATAN[i] = round(atan(2^-i) * 2^20 / (2*pi)), i.e. in units
// of 2^-20 turn (angle with GUARD = 2 extra bits).
//
// Timing: `start` in cycle 0 loads the operands; `done` pulses in cycle
// ITER+1 with `xo`, `yo` valid and held. With ITER = 18 that is 19 cycles.
// The CORDIC method with a look-up table follows the design; the number of
// iterations, the guard bits and the pre-rotation are choices of this
// implementation, sized so that scheduler + rotate + scale take the design's
// 23 cycles.
module cordic_rotate #(
  parameter int ITER = 18               // micro-rotations, at most 18
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  foc_pkg::sample_t       xi,
  input  foc_pkg::sample_t       yi,
  input  foc_pkg::angle_t        ang,
  output logic                   done,
  output logic signed [22:0]     xo,   // gain 1.6468, 2 fraction bits
  output logic signed [22:0]     yo,
  output logic                   busy
);
  import foc_pkg::*;

  localparam int GUARD = 2;
  localparam int IW    = 23;            // internal x/y width
  localparam int ZW    = 18 + GUARD;    // residual angle width

  localparam logic [ZW-1:0] ATAN [18] = '{
    20'd131072, 20'd77376, 20'd40884, 20'd20753, 20'd10417, 20'd5213,
    20'd2607,   20'd1304,  20'd652,   20'd326,   20'd163,   20'd81,
    20'd41,     20'd20,    20'd10,    20'd5,     20'd3,     20'd1 };

  logic signed [IW-1:0] x, y;
  logic signed [ZW-1:0] z;
  logic [4:0] i;
  logic run;

  logic signed [IW-1:0] x0, y0;
  logic        [ZW-1:0] z0;

  // Pre-rotation into [-90, +90) degrees.
  always_comb begin
    x0 = IW'(xi) <<< GUARD;
    y0 = IW'(yi) <<< GUARD;
    z0 = {ang, {GUARD{1'b0}}};
    if (ang[17] ^ ang[16]) begin
      x0 = -x0;
      y0 = -y0;
      z0 = z0 - {2'b10, {(ZW-2){1'b0}}};
    end
  end

  assign busy = run;
  assign xo   = x;
  assign yo   = y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; i <= '0; run <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        x <= x0; y <= y0; z <= $signed(z0);
        i <= '0;
        run <= 1'b1;
      end else if (run) begin
        if (z[ZW-1]) begin                 // residual negative: turn clockwise
          x <= x + (y >>> i);
          y <= y - (x >>> i);
          z <= z + $signed(ATAN[i]);
        end else begin
          x <= x - (y >>> i);
          y <= y + (x >>> i);
          z <= z - $signed(ATAN[i]);
        end
        i <= i + 5'd1;
        if (i == 5'(ITER - 1)) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  initial assert (ITER >= 1 && ITER <= 18) else $error("ITER out of range");

endmodule
