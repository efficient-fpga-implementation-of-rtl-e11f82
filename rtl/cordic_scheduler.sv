// cordic_scheduler: shares one CORDIC rotate/scale pipeline between the Park
// and the inverse Park transform.
//   Park:          (d, q)         = rotate((alpha, beta), -theta)
//   inverse Park:  (alpha, beta)  = rotate((d, q),        +theta)
// so the two transforms differ only in the operands and the sign of the angle.
// A request (`start_park` or `start_ipark`, not both) latches the selected
// operands and the angle, negating it for Park, and starts cordic_rotate;
// when the rotation is done cordic_scale removes the gain.
//
// Timing: a request in cycle 0 gives `done` in cycle 23 (1 cycle operand
// register, ITER+1 = 19 rotate, 3 scale) with `res` valid and held, and `mode`
// telling which transform finished. `busy` is high from the cycle after the
// request until `done`; a request while busy is an error (assertion).
// The 23-cycle latency, the angle negation for Park and the rotate/scale
// split follow the design; the handshake is this implementation's.
module cordic_scheduler #(
  parameter int ITER = 18
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start_park,
  input  logic                  start_ipark,
  input  foc_pkg::ab_t          i_ab,      // Park input
  input  foc_pkg::dq_t          v_dq,      // inverse Park input
  input  foc_pkg::angle_t       theta,
  output logic                  done,
  output foc_pkg::cordic_mode_e mode,
  output logic signed [35:0]    res,       // {x, y}: (d,q) or (alpha,beta)
  output logic                  busy
);
  import foc_pkg::*;

  sample_t x_r, y_r, xs, ys;
  angle_t  a_r;
  logic    go, rot_done, rot_busy;
  logic signed [22:0] xr, yr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_r <= '0; y_r <= '0; a_r <= '0; go <= 1'b0; mode <= CORDIC_PARK; busy <= 1'b0;
    end else begin
      go <= 1'b0;
      if (start_park) begin
        x_r <= i_ab.alpha; y_r <= i_ab.beta; a_r <= -theta;
        mode <= CORDIC_PARK; go <= 1'b1; busy <= 1'b1;
      end else if (start_ipark) begin
        x_r <= v_dq.d; y_r <= v_dq.q; a_r <= theta;
        mode <= CORDIC_IPARK; go <= 1'b1; busy <= 1'b1;
      end else if (done) begin
        busy <= 1'b0;
      end
    end
  end

  cordic_rotate #(.ITER(ITER)) u_rot (
    .clk, .rst_n, .start(go), .xi(x_r), .yi(y_r), .ang(a_r),
    .done(rot_done), .xo(xr), .yo(yr), .busy(rot_busy));

  cordic_scale u_scale (
    .clk, .rst_n, .start(rot_done), .xi(xr), .yi(yr),
    .done, .xo(xs), .yo(ys));

  assign res = {xs, ys};

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    (start_park || start_ipark) |-> !busy || done);
  a_one_request: assert property (@(posedge clk) disable iff (!rst_n)
    !(start_park && start_ipark));

endmodule
