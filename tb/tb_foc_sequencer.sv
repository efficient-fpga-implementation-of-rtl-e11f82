// tb_foc_sequencer: models every unit of the control step as a fixed delay
// (ADC 5, Clarke 4, CORDIC 23, PI 11, inverse Clarke 4) driven by the
// sequencer's own start outputs. Checks the tick period of 72 cycles, the
// order and time of every start within a step (Clarke 5, Park 9, Id 32,
// Iq 43, inverse Park 54, inverse Clarke 77, SVM 81) and that ticks stop
// when `enable` is low.
module tb_foc_sequencer;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enable, tick;
  logic adc_done, clarke_valid, cordic_done, pi_id_done, pi_iq_done, iclarke_valid;
  cordic_mode_e cordic_mode;
  logic adc_start, speed_start, clarke_start, park_start, id_start, iq_start;
  logic ipark_start, iclarke_start, svm_start;

  foc_sequencer dut (.clk, .rst_n, .enable, .tick, .adc_done, .clarke_valid,
    .cordic_done, .cordic_mode, .pi_id_done, .pi_iq_done, .iclarke_valid,
    .adc_start, .speed_start, .clarke_start, .park_start, .id_start, .iq_start,
    .ipark_start, .iclarke_start, .svm_start);

  // delay-line models of the units
  logic [4:0]  adc_sr, clk_sr, icl_sr;
  logic [22:0] park_sr, ipark_sr;
  logic [10:0] pid_sr, piq_sr;
  always_ff @(posedge clk) begin
    adc_sr   <= rst_n ? {adc_sr[3:0], adc_start} : '0;
    clk_sr   <= rst_n ? {clk_sr[3:0], clarke_start} : '0;
    icl_sr   <= rst_n ? {icl_sr[3:0], iclarke_start} : '0;
    park_sr  <= rst_n ? {park_sr[21:0], park_start} : '0;
    ipark_sr <= rst_n ? {ipark_sr[21:0], ipark_start} : '0;
    pid_sr   <= rst_n ? {pid_sr[9:0], id_start} : '0;
    piq_sr   <= rst_n ? {piq_sr[9:0], iq_start} : '0;
  end
  assign adc_done      = adc_sr[4];
  assign clarke_valid  = clk_sr[3];
  assign iclarke_valid = icl_sr[3];
  assign cordic_done   = park_sr[22] | ipark_sr[22];
  assign cordic_mode   = ipark_sr[22] ? CORDIC_IPARK : CORDIC_PARK;
  assign pi_id_done    = pid_sr[10];
  assign pi_iq_done    = piq_sr[10];

  int cyc = 0, last_tick = -1, n_tick = 0;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic expect_at(input logic s, input int off, input string nm);
    if (s && last_tick >= 0) begin
      int d = (cyc - last_tick + 72) % 72;
      // a start belongs to the step whose tick is off cycles back
      checks++;
      if (d != off % 72) begin failures++; $display("%s at %0d, expected %0d", nm, d, off); end
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    expect_at(clarke_start, 5, "clarke");
    expect_at(park_start, 9, "park");
    expect_at(id_start, 32, "id");
    expect_at(iq_start, 43, "iq");
    expect_at(ipark_start, 54, "ipark");
    expect_at(iclarke_start, 77, "iclarke");
    expect_at(svm_start, 81, "svm");
    if (tick) begin
      checks += 2;
      if (last_tick >= 0 && cyc - last_tick != 72) begin failures++; $display("period %0d", cyc - last_tick); end
      if (!adc_start || !speed_start) begin failures++; $display("tick starts"); end
      last_tick = cyc;
      n_tick++;
    end
    if (!enable) begin
      checks++;
      if (tick) begin failures++; $display("tick while disabled"); end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    enable = 1;
    repeat (72 * 20) @(negedge clk);
    enable = 0;
    repeat (200) @(negedge clk);
    checks++;
    if (n_tick != 20) begin failures++; $display("ticks %0d", n_tick); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
