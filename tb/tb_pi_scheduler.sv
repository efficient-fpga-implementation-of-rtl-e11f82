// tb_pi_scheduler: plays the PI datapath itself. It checks the operands
// routed for each loop (speed: W_REF/W_ACT, Id: 0/Id, Iq: speed result/Iq),
// answers after a random delay with a random result, and checks that the
// result lands in the right register with the right done pulse. Also checks
// that `init` preloads the result registers.
module tb_pi_scheduler;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start_speed, start_id, start_iq, init;
  sample_t w_ref, w_act, id, iq, init_val;
  pi_ch_e init_ch;
  logic pi_start, pi_init, pi_done, pi_busy;
  pi_ch_e pi_ch, pi_y_ch;
  sample_t pi_ref, pi_act, pi_y, iq_ref;
  dq_t v_dq;
  logic done_speed, done_id, done_iq;

  pi_scheduler dut (.clk, .rst_n, .start_speed, .start_id, .start_iq, .w_ref, .w_act,
    .id, .iq, .init, .init_ch, .init_val, .pi_start, .pi_ch, .pi_ref, .pi_act,
    .pi_init, .pi_done, .pi_y_ch, .pi_y, .pi_busy, .iq_ref, .v_dq, .done_speed,
    .done_id, .done_iq);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic req(input pi_ch_e c);
    sample_t r, a, res;
    sample_t exp_ref, exp_act;
    @(negedge clk);
    w_ref = sample_t'($urandom); w_act = sample_t'($urandom);
    id = sample_t'($urandom); iq = sample_t'($urandom);
    case (c)
      PI_SPEED: begin exp_ref = w_ref; exp_act = w_act; start_speed = 1; end
      PI_ID:    begin exp_ref = '0;    exp_act = id;    start_id = 1; end
      default:  begin exp_ref = iq_ref; exp_act = iq;   start_iq = 1; end
    endcase
    #1;
    checks += 2;
    if (!pi_start || pi_ch != c) begin failures++; $display("start/channel"); end
    if (pi_ref != exp_ref || pi_act != exp_act) begin failures++; $display("operands ch %0d", c); end
    @(negedge clk);
    start_speed = 0; start_id = 0; start_iq = 0;
    pi_busy = 1;
    repeat ($urandom_range(1, 12)) @(negedge clk);
    res = sample_t'($urandom);
    pi_done = 1; pi_y = res; pi_y_ch = c; pi_busy = 0;
    #1;
    checks++;
    if (done_speed != (c == PI_SPEED) || done_id != (c == PI_ID) || done_iq != (c == PI_IQ)) begin
      failures++; $display("done pulses");
    end
    @(negedge clk);
    pi_done = 0; pi_y = sample_t'($urandom);
    checks++;
    case (c)
      PI_SPEED: if (iq_ref != res) begin failures++; $display("iq_ref"); end
      PI_ID:    if (v_dq.d != res) begin failures++; $display("vd"); end
      default:  if (v_dq.q != res) begin failures++; $display("vq"); end
    endcase
  endtask

  initial begin
    start_speed = 0; start_id = 0; start_iq = 0; init = 0; init_ch = PI_SPEED;
    init_val = '0; pi_done = 0; pi_busy = 0; pi_y = '0; pi_y_ch = PI_SPEED;
    w_ref = '0; w_act = '0; id = '0; iq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3; c++) begin
      @(negedge clk);
      init = 1; init_ch = pi_ch_e'(c); init_val = sample_t'(1000 * (c + 1));
      #1;
      checks++;
      if (!pi_init) begin failures++; $display("init not passed on"); end
      @(negedge clk);
      init = 0;
    end
    checks++;
    if (iq_ref != 1000 || v_dq.d != 2000 || v_dq.q != 3000) begin failures++; $display("init values"); end
    for (int n = 0; n < 300; n++) begin
      req(PI_SPEED); req(PI_ID); req(PI_IQ);
      if ($urandom_range(0, 1)) req(pi_ch_e'($urandom_range(0, 2)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
