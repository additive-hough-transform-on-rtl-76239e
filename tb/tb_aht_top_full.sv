// tb_aht_top_full: one complete operation of the accelerator at its
// default size (256 x 256 edge map, 32 x 32 blocks of 8 x 8 pixels, 8
// angles, large inner Hough spaces).  The map holds random edge pixels
// (about 8 percent), a vertical line x = 100, a horizontal line y = 200 and
// a 45-degree diagonal x = y.  It is written row by row, one run is
// started, the run length is checked (m*m + k*k + 2 = 1090 clock edges
// from start to done) and all 8 x 619 Hough bins are compared with a
// reference computed here, index round(i*cos + j*sin) +
// round(m*(bx*cos + by*sin)) + n per edge pixel.  The three lines must
// give peaks of at least n votes at (0deg, 100), (90deg, 200) and
// (135deg, 0).
module tb_aht_top_full;
  import aht_pkg::*;
  localparam int N = 256, K = 32, A = 8, M = N / K;
  localparam int BINS = rho_bins(N);
  localparam int RHO_W = $clog2(BINS);
  localparam int HS_W = $clog2(N * N + 1);

  logic clk = 0, rst_n = 0, wr_en = 0, start = 0;
  logic [$clog2(N)-1:0] wr_row = '0;
  logic [N-1:0] wr_data = '0;
  logic [ANG_W-1:0] theta [A];
  logic busy, done;
  logic [$clog2(A)-1:0] rd_angle = '0;
  logic [RHO_W-1:0] rd_rho = '0;
  logic [HS_W-1:0] rd_count;

  logic [N-1:0] image [N];
  int ref_tab [A][BINS];
  int checks = 0, failures = 0;

  for (genvar a = 0; a < A; a++) begin : g_th
    assign theta[a] = '0;
  end

  aht_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_hu(real v);
    return $rtoi($floor(v + 0.5));
  endfunction

  task automatic check_peak(int a, int rho_v);
    rd_angle = a[$clog2(A)-1:0]; rd_rho = RHO_W'(rho_v + N);
    #1;
    checks++;
    if (int'(rd_count) < N) begin
      failures++;
      $display("FAIL peak angle %0d rho %0d: %0d votes", a, rho_v, rd_count);
    end
  endtask

  initial begin
    int lat;
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++)
        image[y][x] = ($urandom_range(0, 99) < 8) || x == 100 || y == 200 || x == y;
    for (int a = 0; a < A; a++) begin
      real th, c, s;
      th = a * 3.14159265358979323846 / A;
      c = $cos(th); s = $sin(th);
      for (int r = 0; r < BINS; r++) ref_tab[a][r] = 0;
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++)
          if (image[y][x])
            ref_tab[a][rnd_hu((x % M) * c + (y % M) * s) + rnd_hu(M * ((x / M) * c + (y / M) * s)) + N]++;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int y = 0; y < N; y++) begin
      @(negedge clk);
      wr_en = 1; wr_row = y[$clog2(N)-1:0]; wr_data = image[y];
    end
    @(negedge clk) wr_en = 0; start = 1;
    @(posedge clk); #1 start = 0;
    lat = 0;
    while (!done) begin
      @(posedge clk); #1;
      lat++;
    end
    checks++;
    if (lat != M * M + K * K + 2) begin failures++; $display("FAIL run length %0d", lat); end
    for (int a = 0; a < A; a++)
      for (int r = 0; r < BINS; r++) begin
        rd_angle = a[$clog2(A)-1:0]; rd_rho = RHO_W'(r);
        #1;
        checks++;
        if (int'(rd_count) != ref_tab[a][r]) begin
          failures++;
          $display("FAIL angle %0d bin %0d got %0d exp %0d", a, r, rd_count, ref_tab[a][r]);
        end
      end
    check_peak(0, 100);
    check_peak(4, 200);
    check_peak(6, 0);
    $display("run length %0d cycles", lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
