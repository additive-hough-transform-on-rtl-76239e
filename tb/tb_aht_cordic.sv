// tb_aht_cordic: starts the CORDIC engine with random coordinates and
// random angles over the half turn (and the corner angles 0, 45, 90 and
// 135 degrees), and compares the result with x*cos(theta) + y*sin(theta)
// computed here in floating point.  The allowed error is 1/8.  It also
// checks the latency: done pulses CORDIC_ITER+1 clock edges after the edge
// that accepts start, for exactly one cycle, and start is ignored while
// busy.
module tb_aht_cordic;
  import aht_pkg::*;
  localparam int XY_W = 10;
  localparam int W = XY_W + CORDIC_FRAC + 3;
  localparam real TOL = 0.125;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [XY_W-1:0] x_in = '0, y_in = '0;
  logic [ANG_W-1:0] theta = '0;
  logic busy, done;
  logic signed [W-1:0] result;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  aht_cordic #(.XY_W(XY_W), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(int x, int y, int th);
    real exp_v, got, err, t;
    int lat;
    @(negedge clk);
    x_in = XY_W'(x); y_in = XY_W'(y); theta = ANG_W'(th); start = 1;
    @(posedge clk);            // start accepted here
    @(negedge clk) start = 1;  // held high while busy: must be ignored
    x_in = '0; y_in = '0;
    lat = 1;
    while (!done) begin
      @(posedge clk); #1;
      if (!done) lat++;
    end
    start = 0;
    // done first seen after edge number lat
    checks++;
    if (lat != CORDIC_ITER + 1) begin
      failures++;
      $display("FAIL latency %0d exp %0d", lat, CORDIC_ITER + 1);
    end
    t = th * 2.0 * 3.14159265358979323846 / 65536.0;
    exp_v = x * $cos(t) + y * $sin(t);
    got = real'(result) / 256.0;
    err = got - exp_v; if (err < 0) err = -err;
    if (err > max_err) max_err = err;
    checks++;
    if (err > TOL) begin
      failures++;
      $display("FAIL x=%0d y=%0d th=%0d got %f exp %f", x, y, th, got, exp_v);
    end
    @(posedge clk); #1;
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 4; c++) run_one(200, 150, c * 8192);
    run_one(255, 255, 8192);
    run_one(-255, 255, 24576);
    for (int t = 0; t < 2000; t++)
      run_one($urandom_range(0, 511) - 256, $urandom_range(0, 511) - 256,
              $urandom_range(0, 32767));
    $display("max error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
