// tb_aht_top: end-to-end test of the accelerator in all three variants,
// (ix) small inner spaces, (x) large inner spaces and (xi) CORDIC, at a
// reduced size: a 64 x 64 edge map in 8 x 8 blocks of 8 x 8 pixels, 4
// angles.  Each edge map is written row by row, a start pulse runs all
// angles, and the whole Hough space (every angle, every rho) is read back
// and compared with a reference computed here from cos/sin (see
// tb_aht_image_module for the rounding rules).  Maps: empty, full, random
// at several densities, and a map holding two straight lines, whose peaks
// must appear at the right (angle, rho).
//
// Counted mechanisms, each of which must occur: rows written, edge pixels
// voted, non-edge pixels skipped, block transfers carrying votes into a
// final Hough space, votes at negative rho, bins that collect more than one
// vote, a write attempted while busy (must be ignored), a start attempted
// while busy (must be ignored), and runs of every variant.
module tb_aht_top;
  import aht_pkg::*;
  localparam int N = 64, K = 8, A = 4, M = N / K;
  localparam int BINS = rho_bins(N);
  localparam int RHO_W = $clog2(BINS);
  localparam int HS_W = $clog2(N * N + 1);
  localparam int NV = 3;

  logic clk = 0, rst_n = 0, wr_en = 0, start = 0;
  logic [$clog2(N)-1:0] wr_row = '0;
  logic [N-1:0] wr_data = '0;
  logic [ANG_W-1:0] theta [A];
  logic [NV-1:0] busy, done;
  logic [$clog2(A)-1:0] rd_angle = '0;
  logic [RHO_W-1:0] rd_rho = '0;
  logic [HS_W-1:0] rd_count [NV];

  logic [N-1:0] image [N];
  int ref_tab [A][BINS];
  int ref_exact [A][BINS];
  int ambiguous [A];
  int checks = 0, failures = 0;

  // mechanism counters
  int n_rows = 0, n_votes = 0, n_skipped = 0, n_transfers = 0, n_negative = 0;
  int n_multi = 0, n_wr_busy = 0, n_start_busy = 0;
  int n_runs [NV];

  for (genvar a = 0; a < A; a++) begin : g_th
    assign theta[a] = ANG_W'(theta_bam(a, A));
  end

  aht_top #(.N(N), .K(K), .A(A), .VARIANT(AHT_SMALL_INNER)) dut_ix (
    .clk, .rst_n, .wr_en, .wr_row, .wr_data, .start, .theta, .busy(busy[0]), .done(done[0]),
    .rd_angle, .rd_rho, .rd_count(rd_count[0]));
  aht_top #(.N(N), .K(K), .A(A), .VARIANT(AHT_LARGE_INNER)) dut_x (
    .clk, .rst_n, .wr_en, .wr_row, .wr_data, .start, .theta, .busy(busy[1]), .done(done[1]),
    .rd_angle, .rd_rho, .rd_count(rd_count[1]));
  aht_top #(.N(N), .K(K), .A(A), .VARIANT(AHT_CORDIC)) dut_xi (
    .clk, .rst_n, .wr_en, .wr_row, .wr_data, .start, .theta, .busy(busy[2]), .done(done[2]),
    .rd_angle, .rd_rho, .rd_count(rd_count[2]));

  always #5 clk = ~clk;

  // Block transfers that carry at least one vote into angle 0's final space.
  always @(posedge clk) begin
    if (dut_x.g_angle[0].u_img.m_valid) begin
      for (int j = 0; j < local_bins(M); j++)
        if (dut_x.g_angle[0].u_img.m_cnt[j] != '0) begin n_transfers++; break; end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_hu(real v);
    return $rtoi($floor(v + 0.5));
  endfunction

  task automatic build_reference();
    for (int a = 0; a < A; a++) begin
      real th, c, s, ex, fr;
      th = a * 3.14159265358979323846 / A;
      c = $cos(th); s = $sin(th);
      ambiguous[a] = 0;
      for (int r = 0; r < BINS; r++) begin ref_tab[a][r] = 0; ref_exact[a][r] = 0; end
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++)
          if (image[y][x]) begin
            ref_tab[a][rnd_hu((x % M) * c + (y % M) * s) + rnd_hu(M * ((x / M) * c + (y / M) * s)) + N]++;
            ex = x * c + y * s;
            ref_exact[a][rnd_hu(ex) + N]++;
            fr = ex + 0.5 - $floor(ex + 0.5);
            if (fr < 0.2 || fr > 0.8) ambiguous[a]++;
          end
    end
  endtask

  task automatic load_image();
    for (int y = 0; y < N; y++) begin
      @(negedge clk);
      wr_en = 1; wr_row = y[$clog2(N)-1:0]; wr_data = image[y];
      n_rows++;
    end
    @(negedge clk) wr_en = 0;
  endtask

  task automatic run_and_check(string name);
    int l1 [A];
    int tot_d [A], tot_r [A];
    build_reference();
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    // While busy: a stray write and a second start, both to be ignored.
    repeat (5) @(negedge clk);
    wr_en = 1; wr_row = '0; wr_data = ~image[0]; start = 1;
    n_wr_busy++; n_start_busy++;
    @(negedge clk) wr_en = 0; start = 0;
    while (busy != '0) @(negedge clk);
    for (int v = 0; v < NV; v++) n_runs[v]++;
    for (int a = 0; a < A; a++) begin l1[a] = 0; tot_d[a] = 0; tot_r[a] = 0; end
    for (int a = 0; a < A; a++) begin
      for (int r = 0; r < BINS; r++) begin
        rd_angle = a[$clog2(A)-1:0]; rd_rho = RHO_W'(r);
        #1;
        for (int v = 0; v < 2; v++) begin
          checks++;
          if (int'(rd_count[v]) != ref_tab[a][r]) begin
            failures++;
            $display("FAIL %s variant %0d angle %0d bin %0d got %0d exp %0d",
                     name, v, a, r, rd_count[v], ref_tab[a][r]);
          end
        end
        if (ref_tab[a][r] > 1) n_multi++;
        if (r < N) n_negative += ref_tab[a][r];
        l1[a] += (int'(rd_count[2]) > ref_exact[a][r]) ? int'(rd_count[2]) - ref_exact[a][r]
                                                       : ref_exact[a][r] - int'(rd_count[2]);
        tot_d[a] += int'(rd_count[2]);
        tot_r[a] += ref_exact[a][r];
      end
      checks += 2;
      if (tot_d[a] != tot_r[a]) begin failures++; $display("FAIL %s xi angle %0d votes", name, a); end
      if (l1[a] > 2 * ambiguous[a]) begin
        failures++;
        $display("FAIL %s xi angle %0d differs in %0d votes (%0d ambiguous)", name, a, l1[a], ambiguous[a]);
      end
    end
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++)
        if (image[y][x]) n_votes++; else n_skipped++;
  endtask

  // The bin a pixel set on line rho = x*cos + y*sin must peak in.
  task automatic check_peak(int a, int rho_v, int min_votes);
    rd_angle = a[$clog2(A)-1:0]; rd_rho = RHO_W'(rho_v + N);
    #1;
    for (int v = 0; v < NV; v++) begin
      checks++;
      if (int'(rd_count[v]) < min_votes) begin
        failures++;
        $display("FAIL peak variant %0d angle %0d rho %0d: %0d votes", v, a, rho_v, rd_count[v]);
      end
    end
  endtask

  initial begin
    for (int v = 0; v < NV; v++) n_runs[v] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      int dens;
      dens = (t == 0) ? 0 : (t == 1) ? 100 : (t == 2) ? 3 : (t == 3) ? 15 : 50;
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++) image[y][x] = ($urandom_range(0, 99) < dens);
      load_image();
      run_and_check($sformatf("density %0d", dens));
    end
    // Two lines: the vertical line x = 20 (angle 0, rho 20) and the
    // horizontal line y = 37 (angle 2, 90 degrees, rho 37).
    for (int y = 0; y < N; y++) image[y] = '0;
    for (int y = 0; y < N; y++) image[y][20] = 1'b1;
    image[37] = '1;
    load_image();
    run_and_check("lines");
    check_peak(0, 20, N);
    check_peak(2, 37, N);
    // Mechanisms that must have happened.
    $display("rows %0d votes %0d skipped %0d transfers %0d negative %0d multi %0d wr_busy %0d start_busy %0d runs %0d/%0d/%0d",
             n_rows, n_votes, n_skipped, n_transfers, n_negative, n_multi, n_wr_busy, n_start_busy,
             n_runs[0], n_runs[1], n_runs[2]);
    checks += 10;
    if (n_rows == 0)       begin failures++; $display("FAIL no rows written"); end
    if (n_votes == 0)      begin failures++; $display("FAIL no edge pixels voted"); end
    if (n_skipped == 0)    begin failures++; $display("FAIL no non-edge pixels"); end
    if (n_transfers == 0)  begin failures++; $display("FAIL no block transfers with votes"); end
    if (n_negative == 0)   begin failures++; $display("FAIL no negative rho votes"); end
    if (n_multi == 0)      begin failures++; $display("FAIL no bin with several votes"); end
    if (n_wr_busy == 0)    begin failures++; $display("FAIL no write while busy"); end
    if (n_start_busy == 0) begin failures++; $display("FAIL no start while busy"); end
    if (n_runs[0] == 0 || n_runs[1] == 0) begin failures++; $display("FAIL table variants not run"); end
    if (n_runs[2] == 0)    begin failures++; $display("FAIL CORDIC variant not run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
