// tb_aht_block_cordic: runs the CORDIC block module (block column 31, row
// 5 of a 256 x 256 map) for random run-time angles: clear, one GHT
// computation, then the 64 pixels of the block with random edge bits.
// After every pixel it checks that exactly one bin gained one vote for an
// edge pixel (none otherwise) and that the bin's tag is the final index
// round(x*cos + y*sin) + n, with (x, y) the pixel's image coordinates,
// computed here in floating point.  Where the exact value lies within 0.2
// of a rounding boundary either neighbour is accepted, since the CORDIC
// result is approximate.
module tb_aht_block_cordic;
  import aht_pkg::*;
  localparam int N = 256, K = 32, M = N / K, BX = 31, BY = 5;
  localparam int NB = cordic_bins(M);
  localparam int RHO_W = $clog2(rho_bins(N));
  localparam int CNT_W = $clog2(M * M + 1);
  localparam int GAP = CORDIC_ITER + 3;

  logic clk = 0, rst_n = 0, clear = 0, ght_go = 0, pix_go = 0, edge_bit = 0;
  logic [ANG_W-1:0] theta = '0;
  logic [$clog2(M)-1:0] pix_i = '0, pix_j = '0;
  logic [CNT_W-1:0] cnt [NB];
  logic [RHO_W-1:0] tag [NB];
  int prev [NB];
  int checks = 0, failures = 0, votes = 0;

  aht_block_cordic #(.N(N), .K(K), .BX(BX), .BY(BY)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int run = 0; run < 60; run++) begin
      real th, c, s;
      int dens;
      theta = (run < 4) ? ANG_W'(run * 8192) : ANG_W'($urandom_range(0, 32767));
      th = theta * 2.0 * 3.14159265358979323846 / 65536.0;
      c = $cos(th); s = $sin(th);
      dens = $urandom_range(20, 100);
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0; ght_go = 1;
      @(negedge clk) ght_go = 0;
      repeat (GAP) @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        prev[b] = int'(cnt[b]);
        checks++;
        if (cnt[b] != '0) begin failures++; $display("FAIL not cleared"); end
      end
      for (int p = 0; p < M * M; p++) begin
        real ex;
        int inc, hit, lo, hi, t;
        pix_i = p % M; pix_j = p / M;
        edge_bit = ($urandom_range(0, 99) < dens);
        pix_go = 1;
        @(negedge clk) pix_go = 0;
        repeat (GAP - 1) @(negedge clk);
        inc = 0; hit = -1;
        for (int b = 0; b < NB; b++) begin
          if (int'(cnt[b]) != prev[b]) begin
            inc += int'(cnt[b]) - prev[b];
            hit = b;
          end
          prev[b] = int'(cnt[b]);
        end
        checks++;
        if (inc != (edge_bit ? 1 : 0)) begin
          failures++;
          $display("FAIL pixel %0d edge %0d votes %0d", p, edge_bit, inc);
        end
        if (edge_bit && hit >= 0) begin
          votes++;
          ex = (BX * M + p % M) * c + (BY * M + p / M) * s;
          lo = $rtoi($floor(ex + 0.5)); hi = lo;
          if (ex + 0.5 - $floor(ex + 0.5) < 0.2) lo = lo - 1;
          if (ex + 0.5 - $floor(ex + 0.5) > 0.8) hi = hi + 1;
          t = int'(tag[hit]) - N;
          checks++;
          if (t < lo || t > hi) begin
            failures++;
            $display("FAIL theta %0d pixel %0d rho %0d exp %f", theta, p, t, ex);
          end
        end
      end
    end
    $display("votes checked %0d", votes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
