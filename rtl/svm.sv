// svm: min-max space vector modulation. The common-mode (third-harmonic)
// voltage
//   V3H = (max(Va,Vb,Vc) + min(Va,Vb,Vc)) / 2
// is subtracted from every phase reference, giving SVa = Va - V3H, etc. This
// centres the three references between the rails, which is equivalent to
// centring the two zero vectors of space vector PWM and raises the usable
// line voltage by 2/sqrt(3).
//
// Three-stage pipeline, one vector per cycle: `in_valid` with `v_abc` in
// cycle n gives `out_valid` with `sv_abc` in cycle n+3.
//   stage 1 register inputs with their max and min, stage 2 V3H,
//   stage 3 subtract.
// The equations and the 3-cycle latency follow the design (of its two
// offset formulas, the min+max one is used). Plain adders stand in for the
// MAS unit here; results saturate to 18 bits.
module svm (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  foc_pkg::abc_t  v_abc,
  output logic           out_valid,
  output foc_pkg::abc_t  sv_abc
);
  import foc_pkg::*;

  logic [2:0] v;
  abc_t    p1, p2;
  sample_t mx1, mn1, v3h;
  sample_t mx_c, mn_c;

  always_comb begin
    mx_c = v_abc.a;
    if (v_abc.b > mx_c) mx_c = v_abc.b;
    if (v_abc.c > mx_c) mx_c = v_abc.c;
    mn_c = v_abc.a;
    if (v_abc.b < mn_c) mn_c = v_abc.b;
    if (v_abc.c < mn_c) mn_c = v_abc.c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
      p1 <= '0; p2 <= '0; mx1 <= '0; mn1 <= '0; v3h <= '0;
      sv_abc <= '0;
    end else begin
      v   <= {v[1:0], in_valid};
      p1  <= v_abc;                                        // stage 1
      mx1 <= mx_c;
      mn1 <= mn_c;
      p2  <= p1;                                           // stage 2
      v3h <= sample_t'((19'(mx1) + 19'(mn1)) >>> 1);
      sv_abc.a <= sat18(48'(p2.a) - 48'(v3h));             // stage 3
      sv_abc.b <= sat18(48'(p2.b) - 48'(v3h));
      sv_abc.c <= sat18(48'(p2.c) - 48'(v3h));
    end
  end

  assign out_valid = v[2];

endmodule
