// tb_aht_block_large: drives the block module with random pixel streams
// (random edge bits, local bins, vote enables and GHT offsets) and compares
// the inner Hough space after every cycle with a model kept here.  Each
// run starts with clear; a stream of m*m pixels is also checked to take
// effect one cycle after it is presented.
module tb_aht_block_large;
  localparam int N = 256, K = 32, M = N / K;
  localparam int NB = ((M - 1) * 1415 + 999) / 1000 + 2;
  localparam int LB_W = $clog2(NB);
  localparam int RHO_W = $clog2(N + ((N - 1) * 1415 + 999) / 1000 + 2);
  localparam int CNT_W = $clog2(M * M + 1);

  logic clk = 0, rst_n = 0, clear = 0, vote = 0, edge_bit = 0;
  logic [LB_W-1:0] lbin = '0;
  logic [CNT_W-1:0] cnt [NB];
  logic [RHO_W-1:0] ght = '0; logic [RHO_W-1:0] tag [NB]; int mtag [NB];
  int mcnt [NB];
  int checks = 0, failures = 0;

  aht_block_large #(.N(N), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .vote(vote), .edge_bit(edge_bit),
    .lbin(lbin), .cnt(cnt), .ght(ght), .tag(tag));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (int'(cnt[b]) != mcnt[b]) begin
        failures++;
        $display("FAIL %s bin %0d cnt %0d exp %0d", what, b, cnt[b], mcnt[b]);
      end
      if (mcnt[b] != 0) begin
        checks++;
        if (int'(tag[b]) != mtag[b]) begin
          failures++;
          $display("FAIL %s bin %0d tag %0d exp %0d", what, b, tag[b], mtag[b]);
        end
      end
    end
  endtask

  initial begin
    for (int b = 0; b < NB; b++) mcnt[b] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    compare("reset");
    for (int run = 0; run < 40; run++) begin
      int dens;
      dens = $urandom_range(0, 100);
      @(negedge clk);
      clear = 1; vote = 0;
      @(posedge clk); #1;
      for (int b = 0; b < NB; b++) mcnt[b] = 0;
      compare("clear");
      @(negedge clk) clear = 0;
      ght = RHO_W'($urandom_range(0, 600));
      for (int p = 0; p < M * M; p++) begin
        @(negedge clk);
        vote = ($urandom_range(0, 9) != 0);
        edge_bit = ($urandom_range(0, 99) < dens);
        lbin = LB_W'($urandom_range(0, NB - 1));
        if (vote && edge_bit) begin
          mcnt[lbin]++;
          mtag[lbin] = int'(ght) + int'(lbin);
        end
        @(posedge clk); #1;
        compare("vote");
      end
      @(negedge clk) vote = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
