// tb_aht_hough_accum: sends random transfers of NB (count, index) pairs to
// the final Hough space (non-zero counts at distinct indices, zero counts
// with arbitrary stale indices) and compares every bin, read through the
// read port, with a model kept here.  It also checks clear and that a
// cycle without in_valid changes nothing.
module tb_aht_hough_accum;
  import aht_pkg::*;
  localparam int N = 256, NB = 12, CNT_W = 7;
  localparam int BINS = rho_bins(N);
  localparam int RHO_W = $clog2(BINS);
  localparam int HS_W = $clog2(N * N + 1);

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [CNT_W-1:0] in_cnt [NB];
  logic [RHO_W-1:0] in_tag [NB];
  logic [RHO_W-1:0] rd_addr = '0;
  logic [HS_W-1:0] rd_data;
  int model [BINS];
  int checks = 0, failures = 0;

  aht_hough_accum #(.N(N), .NB(NB), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all(string what);
    for (int r = 0; r < BINS; r++) begin
      rd_addr = RHO_W'(r);
      #1;
      checks++;
      if (int'(rd_data) != model[r]) begin
        failures++;
        $display("FAIL %s bin %0d got %0d exp %0d", what, r, rd_data, model[r]);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < BINS; r++) model[r] = 0;
    for (int j = 0; j < NB; j++) begin in_cnt[j] = '0; in_tag[j] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    compare_all("reset");
    for (int run = 0; run < 6; run++) begin
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      for (int r = 0; r < BINS; r++) model[r] = 0;
      compare_all("clear");
      for (int t = 0; t < 1500; t++) begin
        int base;
        @(negedge clk);
        in_valid = ($urandom_range(0, 7) != 0);
        base = $urandom_range(0, BINS - NB);
        for (int j = 0; j < NB; j++) begin
          in_cnt[j] = ($urandom_range(0, 2) == 0) ? '0 : CNT_W'($urandom_range(1, 64));
          // Non-zero pairs use the window base..base+NB-1 in shuffled-free
          // order; zero pairs get a random (possibly colliding) index.
          in_tag[j] = (in_cnt[j] != '0) ? RHO_W'(base + j) : RHO_W'($urandom_range(0, BINS - 1));
          if (in_valid && in_cnt[j] != '0) model[base + j] += int'(in_cnt[j]);
        end
      end
      @(negedge clk) in_valid = 0;
      repeat (2) @(negedge clk);
      compare_all("after transfers");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
