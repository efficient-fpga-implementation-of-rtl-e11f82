// adc_scaler: turns three 12-bit phase-current samples from the on-chip ADC
// into the 18-bit signed currents used by the rest of the controller.
//
// The ADC delivers unipolar offset-binary codes (0..4095, mid-scale 2048 =
// zero current). Each code is re-centred to a signed value and multiplied by
// GAIN with a single shared MAS unit; a small state machine issues the three
// multiplications on consecutive cycles.
//
// Timing: `start` in cycle 0 captures ia/ib/ic; `done` pulses in cycle 5 with
// `i_abc` valid (and held until the next conversion). A new `start` is taken
// whenever the unit is idle (from cycle 5 on): cycle 1 multiplies phase a,
// cycle 2 phase b, cycle 3 phase c, and each product is stored a cycle later.
//
// From the design: 12-bit input, 18-bit output, one multiplier plus a state
// machine, 5-cycle latency. Own choices: the offset-binary input coding, the
// mid-scale offset and GAIN = 64 (12-bit full scale onto 18-bit full scale).
module adc_scaler #(
  parameter int          IN_W   = 12,
  parameter logic [17:0] GAIN   = 18'd64,     // integer gain, Q0
  parameter logic [11:0] OFFSET = 12'd2048    // code of zero current
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [IN_W-1:0]    ia,
  input  logic [IN_W-1:0]    ib,
  input  logic [IN_W-1:0]    ic,
  output logic               done,
  output foc_pkg::abc_t      i_abc,
  output logic               busy
);
  import foc_pkg::*;

  typedef enum logic [2:0] { S_IDLE, S_MA, S_MB, S_MC, S_RC } state_e;
  state_e state;

  sample_t ca, cb, cc;            // re-centred codes
  mas_op_e op;
  sample_t ma, mb, my;

  function automatic sample_t centre(input logic [IN_W-1:0] code);
    return sample_t'(code) - sample_t'(OFFSET);
  endfunction

  mas #(.W(DW)) u_mas (.clk, .rst_n, .op, .a(ma), .b(mb), .shift(6'd0), .y(my));

  always_comb begin
    op = MAS_MUL;
    mb = sample_t'(GAIN);
    unique case (state)
      S_MA:    ma = ca;
      S_MB:    ma = cb;
      S_MC:    ma = cc;
      default: ma = '0;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      ca <= '0; cb <= '0; cc <= '0;
      i_abc <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ca <= centre(ia); cb <= centre(ib); cc <= centre(ic);
          state <= S_MA;
        end
        S_MA: state <= S_MB;
        S_MB: begin i_abc.a <= my; state <= S_MC; end
        S_MC: begin i_abc.b <= my; state <= S_RC; end
        S_RC: begin i_abc.c <= my; done <= 1'b1; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
