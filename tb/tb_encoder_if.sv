// tb_encoder_if: drives quadrature waveforms (A leading B = clockwise, then B
// leading A) with random spacing, checks theta after every edge against the
// count times ANGLE_FACTOR (with wrap-around), the 3-cycle latency, the
// direction flag, the speed W = counts per window * SPEED_FACTOR, and the
// error pulse on a step where both channels change at once. The speed window
// is shortened to 200 cycles.
module tb_encoder_if;
  import foc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int WIN = 200;
  logic qa, qb, w_valid, dir_cw, err;
  angle_t theta;
  sample_t w;
  encoder_if #(.SPEED_WINDOW(WIN)) dut (.clk, .rst_n, .qa, .qb, .theta, .w, .w_valid, .dir_cw, .err);

  int pos = 0;            // expected count
  int cyc = 0;
  int n_err = 0, n_w = 0, n_wneg = 0, n_wpos = 0;

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && w_valid) begin
    n_w++;
    if (w < 0) n_wneg++;
    if (w > 0) n_wpos++;
  end

  // one quadrature step in the given direction; checks latency and theta
  task automatic edge_step(input bit cw);
    logic [1:0] s, nx;
    int lat;
    s = {qa, qb};
    if (cw) nx = (s == 2'b00) ? 2'b10 : (s == 2'b10) ? 2'b11 : (s == 2'b11) ? 2'b01 : 2'b00;
    else    nx = (s == 2'b00) ? 2'b01 : (s == 2'b01) ? 2'b11 : (s == 2'b11) ? 2'b10 : 2'b00;
    @(negedge clk);
    {qa, qb} = nx;
    pos += cw ? 1 : -1;
    lat = 0;
    while (theta != angle_t'(pos * 64) && lat < 10) begin @(negedge clk); lat++; end
    checks += 3;
    if (lat != 3) begin failures++; $display("latency %0d", lat); end
    if (theta != angle_t'(pos * 64)) begin failures++; $display("theta %0d exp %0d", theta, angle_t'(pos * 64)); end
    if (dir_cw != cw) begin failures++; $display("direction"); end
    repeat ($urandom_range(0, 6)) @(negedge clk);
  endtask

  initial begin
    qa = 0; qb = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 5000; n++) edge_step(1'b1);     // more than one turn: wraps
    for (int n = 0; n < 600; n++) edge_step(1'b0);
    for (int n = 0; n < 400; n++) edge_step($urandom_range(0, 1));
    // invalid double step
    @(negedge clk);
    {qa, qb} = ~{qa, qb};
    repeat (4) begin @(negedge clk); if (err) n_err++; end
    checks++;
    if (n_err != 1) begin failures++; $display("error pulse %0d", n_err); end
    checks++;
    if (n_w == 0 || n_wpos == 0 || n_wneg == 0) begin failures++; $display("speed not seen both signs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // W must equal SPEED_FACTOR times the counts seen since the last update,
  // i.e. the theta change over the window divided by ANGLE_FACTOR.
  angle_t th_win;
  initial th_win = '0;
  always @(negedge clk) if (rst_n && w_valid) begin
    int dth;
    dth = int'($signed(theta - th_win)) / 64;
    checks++;
    if (int'(w) != dth * 64) begin failures++; $display("w %0d exp %0d", w, dth * 64); end
    th_win = theta;
  end
endmodule
