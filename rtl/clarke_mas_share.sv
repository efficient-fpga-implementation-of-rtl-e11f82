// clarke_mas_share: the one MAS unit used by both the Clarke and the inverse
// Clarke transform. Each transform needs a single multiplication by a
// constant per sample (1/sqrt(3) or sqrt(3)/2, shift 16). In the fixed
// control schedule the two requests fall in different cycles (cycle 7 and
// cycle 78 = 6 mod 72 of a step), so a plain multiplexer suffices: a Clarke
// request wins, and an assertion flags a collision. The product comes back
// one cycle later to both users; each uses it only after its own request.
// Sharing one MAS between the two transforms follows the design; the
// multiplexer is this implementation's.
module clarke_mas_share (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_c,
  input  foc_pkg::sample_t a_c,
  input  foc_pkg::sample_t b_c,
  input  logic             req_i,
  input  foc_pkg::sample_t a_i,
  input  foc_pkg::sample_t b_i,
  output foc_pkg::sample_t y
);
  import foc_pkg::*;

  sample_t ma, mb;

  assign ma = req_c ? a_c : a_i;
  assign mb = req_c ? b_c : b_i;

  mas #(.W(DW)) u_mas (.clk, .rst_n, .op(MAS_MUL), .a(ma), .b(mb), .shift(6'd16), .y);

  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n) !(req_c && req_i));

endmodule
