// pi_scheduler: time-shares the one PI datapath between the three control
// loops and holds their results.
//   speed loop: ref = W_REF,              act = W_ACT -> Iq reference
//   Id loop:    ref = 0,                  act = Id    -> Vd
//   Iq loop:    ref = speed loop output,  act = Iq    -> Vq
// A request pulse selects the operands for pi_controller and starts it; when
// the controller reports `done` the result goes to the register of its
// channel and the matching done pulse is raised in the same cycle.
//
// `init` writes `init_val` into a channel's result register and passes it to
// the controller's integrator, so a loop outputs a sensible value before it
// first runs. Requests must not overlap a running PI step (assertion); the
// fixed FOC schedule never does so.
// The operand routing follows the design; the request/done handshake is this
// implementation's.
module pi_scheduler (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_speed,
  input  logic              start_id,
  input  logic              start_iq,
  input  foc_pkg::sample_t  w_ref,
  input  foc_pkg::sample_t  w_act,
  input  foc_pkg::sample_t  id,
  input  foc_pkg::sample_t  iq,
  input  logic              init,
  input  foc_pkg::pi_ch_e   init_ch,
  input  foc_pkg::sample_t  init_val,
  // to / from pi_controller
  output logic              pi_start,
  output foc_pkg::pi_ch_e   pi_ch,
  output foc_pkg::sample_t  pi_ref,
  output foc_pkg::sample_t  pi_act,
  output logic              pi_init,
  input  logic              pi_done,
  input  foc_pkg::pi_ch_e   pi_y_ch,
  input  foc_pkg::sample_t  pi_y,
  input  logic              pi_busy,
  // results
  output foc_pkg::sample_t  iq_ref,
  output foc_pkg::dq_t      v_dq,
  output logic              done_speed,
  output logic              done_id,
  output logic              done_iq
);
  import foc_pkg::*;

  always_comb begin
    pi_start = start_speed | start_id | start_iq;
    pi_init  = init;
    if (start_speed) begin
      pi_ch = PI_SPEED; pi_ref = w_ref;  pi_act = w_act;
    end else if (start_id) begin
      pi_ch = PI_ID;    pi_ref = '0;     pi_act = id;
    end else begin
      pi_ch = PI_IQ;    pi_ref = iq_ref; pi_act = iq;
    end
  end

  assign done_speed = pi_done && (pi_y_ch == PI_SPEED);
  assign done_id    = pi_done && (pi_y_ch == PI_ID);
  assign done_iq    = pi_done && (pi_y_ch == PI_IQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iq_ref <= '0; v_dq <= '0;
    end else if (init && !pi_busy && !pi_start) begin
      unique case (init_ch)
        PI_SPEED: iq_ref   <= init_val;
        PI_ID:    v_dq.d   <= init_val;
        PI_IQ:    v_dq.q   <= init_val;
        default: ;
      endcase
    end else if (pi_done) begin
      unique case (pi_y_ch)
        PI_SPEED: iq_ref   <= pi_y;
        PI_ID:    v_dq.d   <= pi_y;
        PI_IQ:    v_dq.q   <= pi_y;
        default: ;
      endcase
    end
  end

  a_one_request: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({start_speed, start_id, start_iq}));
  a_not_busy: assert property (@(posedge clk) disable iff (!rst_n)
    pi_start |-> !pi_busy || pi_done);

endmodule
