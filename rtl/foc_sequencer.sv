// foc_sequencer: the schedule of one FOC control step.
//
// Every SAMPLE_PERIOD cycles (while `enable` is high) it raises `tick`, which
// starts the ADC conversion and, in parallel, the speed PI step. From then on
// each unit starts in the cycle its predecessor finishes:
//   ADC (5) -> Clarke (4) -> Park on the CORDIC (23) -> Id PI (11)
//   -> Iq PI (11) -> inverse Park on the CORDIC (23) -> inverse Clarke (4)
//   -> SVM (3)
// which gives 84 cycles from `tick` to the modulated references. The speed PI
// (11 cycles) finishes long before the Iq PI needs its output. With the
// default period of 72 the next step's ADC and Clarke stages overlap the
// previous step's inverse Clarke and SVM, while the shared CORDIC and PI units
// are never asked for twice at once; a shorter period would collide on the
// CORDIC (assertion in cordic_scheduler).
// The chain, the latencies, the 84-cycle total and the 72-cycle initiation
// interval follow the design; the free-running period counter is this
// implementation's way to start a step.
module foc_sequencer #(
  parameter int SAMPLE_PERIOD = 72
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  output logic                  tick,
  // completion of each unit
  input  logic                  adc_done,
  input  logic                  clarke_valid,
  input  logic                  cordic_done,
  input  foc_pkg::cordic_mode_e cordic_mode,
  input  logic                  pi_id_done,
  input  logic                  pi_iq_done,
  input  logic                  iclarke_valid,
  // starts
  output logic                  adc_start,
  output logic                  speed_start,
  output logic                  clarke_start,
  output logic                  park_start,
  output logic                  id_start,
  output logic                  iq_start,
  output logic                  ipark_start,
  output logic                  iclarke_start,
  output logic                  svm_start
);
  import foc_pkg::*;

  logic [$clog2(SAMPLE_PERIOD)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   cnt <= '0;
    else if (!enable)             cnt <= '0;
    else if (cnt == ($bits(cnt))'(SAMPLE_PERIOD - 1)) cnt <= '0;
    else                          cnt <= cnt + 1'b1;
  end

  assign tick          = enable && (cnt == '0);
  assign adc_start     = tick;
  assign speed_start   = tick;
  assign clarke_start  = adc_done;
  assign park_start    = clarke_valid;
  assign id_start      = cordic_done && (cordic_mode == CORDIC_PARK);
  assign iq_start      = pi_id_done;
  assign ipark_start   = pi_iq_done;
  assign iclarke_start = cordic_done && (cordic_mode == CORDIC_IPARK);
  assign svm_start     = iclarke_valid;

  initial assert (SAMPLE_PERIOD >= 2) else $error("SAMPLE_PERIOD too small");

endmodule
