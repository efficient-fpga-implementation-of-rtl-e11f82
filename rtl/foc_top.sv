// foc_top: field-oriented controller for a three-phase permanent-magnet
// machine (PMSM or BLDC) with an incremental encoder.
//
// One control step turns three phase-current samples, the rotor angle and a
// speed command into three space-vector-modulated phase voltage references:
//   currents -> adc_scaler -> clarke -> Park (CORDIC) -> Id, Iq
//   speed PI (W_REF vs W) -> Iq reference;  Id PI (ref 0), Iq PI
//   (Vd, Vq) -> inverse Park (CORDIC) -> inv_clarke -> svm -> references
// Park and inverse Park share one CORDIC (cordic_scheduler); the three PI
// loops share one PI datapath (pi_scheduler + pi_controller); Clarke and
// inverse Clarke share one MAS unit (clarke_mas_share), so four MAS units do
// all multiplications (ADC, Clarke pair, CORDIC scale, PI); foc_sequencer
// chains the units and starts a step every SAMPLE_PERIOD cycles.
//
// Interface: ia/ib/ic are 12-bit offset-binary ADC codes, sampled at the start
// of a step; qa/qb are the encoder channels; w_ref is the speed command in the
// units of W (see encoder_if). The angle and speed used by a step are latched
// with its currents. `pi_init*` preload a PI channel (integrator and held
// output) while the PI unit is idle. sv_abc holds the last references and
// sv_valid pulses when they change. Status outputs expose internal values for
// observation.
//
// Timing: `tick` in cycle 0, sv_valid in cycle 84; a new step every 72 cycles
// (SAMPLE_PERIOD), i.e. 1.39 M steps/s at 100 MHz. Structure and timing
// follow the design; the start-of-step latching and the status ports are
// this implementation's.
module foc_top #(
  parameter int          SAMPLE_PERIOD = 72,
  parameter int          CORDIC_ITER   = 18,
  parameter logic [17:0] ADC_GAIN      = 18'd64,
  parameter logic signed [17:0] KP     = 18'sd6400,
  parameter logic signed [17:0] KI     = 18'sd100,
  parameter logic [17:0] ANGLE_FACTOR  = 18'd64,
  parameter logic [17:0] SPEED_FACTOR  = 18'd64,
  parameter int          SPEED_WINDOW  = 100_000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [11:0]       ia,
  input  logic [11:0]       ib,
  input  logic [11:0]       ic,
  input  logic              qa,
  input  logic              qb,
  input  foc_pkg::sample_t  w_ref,
  input  logic              pi_init,
  input  foc_pkg::pi_ch_e   pi_init_ch,
  input  foc_pkg::sample_t  pi_init_val,
  output foc_pkg::abc_t     sv_abc,
  output logic              sv_valid,
  // status
  output logic              tick,
  output foc_pkg::angle_t   theta,
  output foc_pkg::sample_t  w_act,
  output foc_pkg::ab_t      i_ab,
  output foc_pkg::dq_t      i_dq,
  output foc_pkg::dq_t      v_dq,
  output foc_pkg::ab_t      v_ab,
  output foc_pkg::sample_t  iq_ref,
  output logic              pi_clamped,
  output logic              enc_dir_cw,
  output logic              enc_err
);
  import foc_pkg::*;

  // encoder
  angle_t  theta_now;
  sample_t w_now;
  logic    w_valid;

  encoder_if #(.ANGLE_FACTOR(ANGLE_FACTOR), .SPEED_FACTOR(SPEED_FACTOR),
               .SPEED_WINDOW(SPEED_WINDOW)) u_enc (
    .clk, .rst_n, .qa, .qb, .theta(theta_now), .w(w_now), .w_valid,
    .dir_cw(enc_dir_cw), .err(enc_err));

  // sequencing
  logic adc_start, speed_start, clarke_start, park_start, id_start, iq_start;
  logic ipark_start, iclarke_start, svm_start;
  logic adc_done, adc_busy, clarke_valid, cordic_done, cordic_busy;
  logic done_speed, done_id, done_iq, iclarke_valid;
  cordic_mode_e cordic_mode;

  foc_sequencer #(.SAMPLE_PERIOD(SAMPLE_PERIOD)) u_seq (
    .clk, .rst_n, .enable, .tick,
    .adc_done, .clarke_valid, .cordic_done, .cordic_mode,
    .pi_id_done(done_id), .pi_iq_done(done_iq), .iclarke_valid,
    .adc_start, .speed_start, .clarke_start, .park_start, .id_start,
    .iq_start, .ipark_start, .iclarke_start, .svm_start);

  // angle and speed of the current step
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      theta <= '0; w_act <= '0;
    end else if (tick) begin
      theta <= theta_now; w_act <= w_now;
    end
  end

  // currents
  abc_t i_abc;

  adc_scaler #(.GAIN(ADC_GAIN)) u_adc (
    .clk, .rst_n, .start(adc_start), .ia, .ib, .ic,
    .done(adc_done), .i_abc, .busy(adc_busy));

  // one MAS unit shared by Clarke and inverse Clarke
  logic    cm_req_c, cm_req_i;
  sample_t cm_a_c, cm_b_c, cm_a_i, cm_b_i, cm_y;

  clarke_mas_share u_cmas (
    .clk, .rst_n, .req_c(cm_req_c), .a_c(cm_a_c), .b_c(cm_b_c),
    .req_i(cm_req_i), .a_i(cm_a_i), .b_i(cm_b_i), .y(cm_y));

  clarke u_clarke (
    .clk, .rst_n, .in_valid(clarke_start), .i_abc,
    .out_valid(clarke_valid), .i_ab,
    .mas_req(cm_req_c), .mas_a(cm_a_c), .mas_b(cm_b_c), .mas_y(cm_y));

  // Park / inverse Park. The inverse Park starts in the cycle the Iq PI
  // result appears, before it is stored, so Vq is taken from the PI output.
  logic signed [35:0] cres;
  dq_t     v_dq_in;
  sample_t pi_y;

  assign v_dq_in = ipark_start ? '{d: v_dq.d, q: pi_y} : v_dq;

  cordic_scheduler #(.ITER(CORDIC_ITER)) u_cordic (
    .clk, .rst_n, .start_park(park_start), .start_ipark(ipark_start),
    .i_ab, .v_dq(v_dq_in), .theta(theta), .done(cordic_done), .mode(cordic_mode),
    .res(cres), .busy(cordic_busy));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) i_dq <= '0;
    else if (id_start) i_dq <= cres;
  end

  assign v_ab = cres;

  // PI loops; the Id PI reads Park's result in the cycle it is latched
  dq_t     i_dq_now;
  logic    pi_start, pi_init_q, pi_done, pi_busy;
  pi_ch_e  pi_ch, pi_y_ch;
  sample_t pi_ref, pi_act;

  assign i_dq_now = id_start ? dq_t'(cres) : i_dq;

  pi_scheduler u_pis (
    .clk, .rst_n, .start_speed(speed_start), .start_id(id_start),
    .start_iq(iq_start), .w_ref, .w_act(tick ? w_now : w_act),
    .id(i_dq_now.d), .iq(i_dq_now.q),
    .init(pi_init), .init_ch(pi_init_ch), .init_val(pi_init_val),
    .pi_start, .pi_ch, .pi_ref, .pi_act, .pi_init(pi_init_q),
    .pi_done, .pi_y_ch, .pi_y, .pi_busy,
    .iq_ref, .v_dq, .done_speed, .done_id, .done_iq);

  pi_controller #(.KP(KP), .KI(KI)) u_pi (
    .clk, .rst_n, .start(pi_start), .ch(pi_ch), .ref_in(pi_ref),
    .act_in(pi_act), .init(pi_init_q), .init_ch(pi_init_ch),
    .init_val(pi_init_val), .done(pi_done), .y_ch(pi_y_ch), .y(pi_y),
    .clamped(pi_clamped), .busy(pi_busy));

  // back to three phases
  abc_t v_abc, sv_now;
  logic svm_valid;

  inv_clarke u_iclarke (
    .clk, .rst_n, .in_valid(iclarke_start), .v_ab(ab_t'(cres)),
    .out_valid(iclarke_valid), .v_abc,
    .mas_req(cm_req_i), .mas_a(cm_a_i), .mas_b(cm_b_i), .mas_y(cm_y));

  svm u_svm (
    .clk, .rst_n, .in_valid(svm_start), .v_abc,
    .out_valid(svm_valid), .sv_abc(sv_now));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sv_abc <= '0;
    else if (svm_valid) sv_abc <= sv_now;
  end
  assign sv_valid = svm_valid;

endmodule
