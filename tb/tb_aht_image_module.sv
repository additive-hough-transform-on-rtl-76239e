// tb_aht_image_module: one image module of each variant, (ix), (x) and
// (xi), at angle 3 of 8 (67.5 degrees) on a 32 x 32 map of 4 x 4 blocks of
// 8 x 8 pixels, fed with the same edge maps: random maps of several
// densities, an empty map and a full map.  The final Hough space of every
// run is compared bin by bin with a reference computed here from cos/sin:
//   (ix), (x): index = round(i*cos + j*sin) + round(m*(bx*cos + by*sin)) + n,
//   (xi):      index = round(x*cos + y*sin) + n, exact up to pixels whose
//              value lies within 0.2 of a rounding boundary.
// It also checks the run length in cycles: m*m + k*k + 2 clock edges from
// the edge that takes start to the one that raises done for the table
// variants, (m*m+1)*(CORDIC_ITER+3) + k*k + 2 for the CORDIC variant.
module tb_aht_image_module;
  import aht_pkg::*;
  localparam int N = 32, K = 4, A = 8, ANGLE = 3, M = N / K;
  localparam int BINS = rho_bins(N);
  localparam int RHO_W = $clog2(BINS);
  localparam int HS_W = $clog2(N * N + 1);
  localparam int NV = 3;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] edge_map [N];
  logic [ANG_W-1:0] theta;
  logic [NV-1:0] busy, done;
  logic [RHO_W-1:0] rd_rho = '0;
  logic [HS_W-1:0] rd_count [NV];
  int checks = 0, failures = 0;
  int ref_tab [BINS];
  int ref_exact [BINS];
  int ambiguous;

  assign theta = ANG_W'(theta_bam(ANGLE, A));

  aht_image_module #(.N(N), .K(K), .A(A), .ANGLE(ANGLE), .VARIANT(AHT_SMALL_INNER)) u_ix (
    .clk, .rst_n, .start, .edge_map, .theta, .busy(busy[0]), .done(done[0]), .rd_rho, .rd_count(rd_count[0]));
  aht_image_module #(.N(N), .K(K), .A(A), .ANGLE(ANGLE), .VARIANT(AHT_LARGE_INNER)) u_x (
    .clk, .rst_n, .start, .edge_map, .theta, .busy(busy[1]), .done(done[1]), .rd_rho, .rd_count(rd_count[1]));
  aht_image_module #(.N(N), .K(K), .A(A), .ANGLE(ANGLE), .VARIANT(AHT_CORDIC)) u_xi (
    .clk, .rst_n, .start, .edge_map, .theta, .busy(busy[2]), .done(done[2]), .rd_rho, .rd_count(rd_count[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_hu(real v);
    return $rtoi($floor(v + 0.5));
  endfunction

  task automatic build_reference();
    real th, c, s, ex, fr;
    th = ANGLE * 3.14159265358979323846 / A;
    c = $cos(th); s = $sin(th);
    ambiguous = 0;
    for (int r = 0; r < BINS; r++) begin ref_tab[r] = 0; ref_exact[r] = 0; end
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++)
        if (edge_map[y][x]) begin
          int i, j, bx, by;
          i = x % M; j = y % M; bx = x / M; by = y / M;
          ref_tab[rnd_hu(i * c + j * s) + rnd_hu(M * (bx * c + by * s)) + N]++;
          ex = x * c + y * s;
          ref_exact[rnd_hu(ex) + N]++;
          fr = ex + 0.5 - $floor(ex + 0.5);
          if (fr < 0.2 || fr > 0.8) ambiguous++;
        end
  endtask

  task automatic run_image(int dens);
    int lat [NV];
    int l1_diff, tot_d, tot_r;
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++)
        edge_map[y][x] = ($urandom_range(0, 99) < dens);
    build_reference();
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int v = 0; v < NV; v++) lat[v] = 0;
    // Count edges after the one that took start until done is seen.
    while (busy != '0) begin
      @(posedge clk); #1;
      for (int v = 0; v < NV; v++) if (busy[v] || done[v]) lat[v]++;
    end
    checks += 3;
    if (lat[0] != M * M + K * K + 2) begin failures++; $display("FAIL ix run length %0d", lat[0]); end
    if (lat[1] != M * M + K * K + 2) begin failures++; $display("FAIL x run length %0d", lat[1]); end
    if (lat[2] != (M * M + 1) * (CORDIC_ITER + 3) + K * K + 2) begin
      failures++; $display("FAIL xi run length %0d", lat[2]);
    end
    l1_diff = 0; tot_d = 0; tot_r = 0;
    for (int r = 0; r < BINS; r++) begin
      rd_rho = RHO_W'(r);
      #1;
      for (int v = 0; v < 2; v++) begin
        checks++;
        if (int'(rd_count[v]) != ref_tab[r]) begin
          failures++;
          $display("FAIL variant %0d density %0d bin %0d got %0d exp %0d", v, dens, r, rd_count[v], ref_tab[r]);
        end
      end
      l1_diff += (int'(rd_count[2]) > ref_exact[r]) ? int'(rd_count[2]) - ref_exact[r]
                                                 : ref_exact[r] - int'(rd_count[2]);
      tot_d += int'(rd_count[2]);
      tot_r += ref_exact[r];
    end
    checks += 2;
    if (tot_d != tot_r) begin failures++; $display("FAIL xi votes %0d exp %0d", tot_d, tot_r); end
    if (l1_diff > 2 * ambiguous) begin
      failures++; $display("FAIL xi differs in %0d votes, %0d ambiguous pixels", l1_diff, ambiguous);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_image(0);
    run_image(100);
    run_image(5);
    run_image(30);
    run_image(60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
