// pi_controller: discrete PI controller shared by the speed loop and the two
// current loops.
//   E(n) = ref - act
//   P(n) = Kp * E(n)
//   I(n) = Ki*Ts * E(n) + I(n-1), clamped to +/-OUT_LIMIT (anti-windup)
//   Y(n) = P(n) + I(n), saturated to +/-OUT_LIMIT
// The datapath is one 36-bit MAS unit stepped by a cycle counter; each channel
// (pi_ch_e: speed, Id, Iq) keeps its own integrator, held with 16 fraction
// bits so that the small integral gain does not lose the error.
//
// Gains are Q16: KP = 6400 (0.097656), KI = 100 (0.001526, the product Ki*Ts).
//
// Schedule, counted from `start` in cycle 0 (operands and channel latched,
// integrator read): 1 subtract, 2 Kp*E, 3 Ki*E, 4 integrator add,
// 5 clamp and write back, 6 P + I, 7 output saturation, then `done` in cycle
// LATENCY (11) with `y`/`y_ch` valid and held. The unit accepts a new `start`
// from cycle LATENCY on. `init` (any time the unit is idle) loads channel
// `init_ch`'s integrator with `init_val`, so that the channel's first output
// equals that value while the error is zero.
//
// The equations, the gains, the anti-windup integrator, the initialisation
// feature, the counter state machine and the 11-cycle latency follow the
// design. Own choices: clamping as the anti-windup method, the Q16 formats,
// the limits, and cycles 8-10 being idle, kept so that the overall schedule
// keeps its 11-cycle PI step.
module pi_controller #(
  parameter logic signed [17:0] KP        = 18'sd6400,
  parameter logic signed [17:0] KI        = 18'sd100,
  parameter logic signed [17:0] OUT_LIMIT = 18'sd131071,
  parameter int                 LATENCY   = 11      // at least 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  foc_pkg::pi_ch_e   ch,
  input  foc_pkg::sample_t  ref_in,
  input  foc_pkg::sample_t  act_in,
  input  logic              init,
  input  foc_pkg::pi_ch_e   init_ch,
  input  foc_pkg::sample_t  init_val,
  output logic              done,
  output foc_pkg::pi_ch_e   y_ch,
  output foc_pkg::sample_t  y,
  output logic              clamped,   // integrator hit its limit in this step
  output logic              busy
);
  import foc_pkg::*;

  localparam int MW = 36;
  typedef logic signed [MW-1:0] acc_t;
  localparam acc_t LIM_HI = acc_t'(OUT_LIMIT) <<< 16;
  localparam acc_t LIM_LO = -LIM_HI;

  acc_t    integ [3];
  acc_t    i_prev, i_new, p_r;
  sample_t r_r, a_r, e_r, e_now;
  pi_ch_e  ch_r;
  logic [4:0] cnt;

  mas_op_e op;
  acc_t    ma, mb, my;
  logic [5:0] msh;

  mas #(.W(MW)) u_mas (.clk, .rst_n, .op, .a(ma), .b(mb), .shift(msh), .y(my));

  assign e_now = sat18(48'(my));

  always_comb begin
    op = MAS_ADD; ma = '0; mb = '0; msh = 6'd0;
    unique case (cnt)
      5'd1: begin op = MAS_SUB; ma = acc_t'(r_r); mb = acc_t'(a_r); end
      5'd2: begin op = MAS_MUL; ma = acc_t'(e_now); mb = acc_t'(KP); msh = 6'd16; end
      5'd3: begin op = MAS_MUL; ma = acc_t'(e_r);   mb = acc_t'(KI); end
      5'd4: begin op = MAS_ADD; ma = i_prev; mb = my; end
      5'd6: begin op = MAS_ADD; ma = p_r; mb = i_new >>> 16; end
      default: ;
    endcase
  end

  assign busy = (cnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; done <= 1'b0; clamped <= 1'b0;
      r_r <= '0; a_r <= '0; e_r <= '0; ch_r <= PI_SPEED; y_ch <= PI_SPEED;
      i_prev <= '0; i_new <= '0; p_r <= '0; y <= '0;
      for (int k = 0; k < 3; k++) integ[k] <= '0;
    end else begin
      done <= 1'b0;
      if (cnt == 0) begin
        if (start) begin
          r_r <= ref_in; a_r <= act_in; ch_r <= ch;
          i_prev <= integ[ch];
          cnt <= 5'd1;
        end else if (init) begin
          integ[init_ch] <= acc_t'(init_val) <<< 16;
        end
      end else begin
        cnt <= (cnt == 5'(LATENCY - 1)) ? 5'd0 : cnt + 5'd1;
        unique case (cnt)
          5'd2: e_r <= e_now;
          5'd3: p_r <= my;
          5'd5: begin
            clamped <= (my > LIM_HI) || (my < LIM_LO);
            i_new   <= (my > LIM_HI) ? LIM_HI : (my < LIM_LO) ? LIM_LO : my;
            integ[ch_r] <= (my > LIM_HI) ? LIM_HI : (my < LIM_LO) ? LIM_LO : my;
          end
          5'd7: begin
            y    <= (my > acc_t'(OUT_LIMIT)) ? OUT_LIMIT :
                    (my < -acc_t'(OUT_LIMIT)) ? -OUT_LIMIT : my[17:0];
            y_ch <= ch_r;
          end
          default: ;
        endcase
        if (cnt == 5'(LATENCY - 1)) done <= 1'b1;
      end
    end
  end

  initial assert (LATENCY >= 8 && LATENCY < 32) else $error("LATENCY out of range");

endmodule
