// aht_hough_accum: final Hough space of one angle.
//
// Holds one vote counter per rho bin (rho_bins(N) bins, index = rho +
// RHO_OFF).  The image module transfers the inner Hough space of one block
// module per cycle: NB (count, final index) pairs.  Every pair with a
// non-zero count is added to the bin its index names, all NB in the same
// cycle (NB adders).  Pairs with a zero count are ignored, so their index
// may be stale.  The non-zero pairs of one transfer must name distinct bins,
// which holds because they come from distinct bins of one block.
//
// Interface: clear (one cycle) zeroes the space; in_valid/in_cnt/in_tag are
// sampled on the rising edge; rd_addr -> rd_data is a combinational read.
// Counters are wide enough for every pixel of the image to vote in one bin.
//
// Summing the inner Hough spaces into a final Hough space follows the
// design; transferring one block per cycle through NB parallel adders is
// this design's choice.
module aht_hough_accum
  import aht_pkg::*;
#(
  parameter int N  = 256,
  parameter int NB = 12,
  parameter int CNT_W = 7                         // width of an inner-space count
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              clear,
  input  logic                              in_valid,
  input  logic [CNT_W-1:0]                  in_cnt [NB],
  input  logic [$clog2(rho_bins(N))-1:0]    in_tag [NB],
  input  logic [$clog2(rho_bins(N))-1:0]    rd_addr,
  output logic [$clog2(N*N+1)-1:0]          rd_data
);

  localparam int BINS  = rho_bins(N);
  localparam int HS_W  = $clog2(N*N+1);

  logic [HS_W-1:0] hs [BINS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < BINS; r++) hs[r] <= '0;
    end else if (clear) begin
      for (int r = 0; r < BINS; r++) hs[r] <= '0;
    end else if (in_valid) begin
      for (int j = 0; j < NB; j++)
        if (in_cnt[j] != '0) hs[in_tag[j]] <= hs[in_tag[j]] + HS_W'(in_cnt[j]);
    end
  end

  assign rd_data = (int'(rd_addr) < BINS) ? hs[rd_addr] : '0;

  // Non-zero pairs of one transfer name distinct, existing bins.
  for (genvar j = 0; j < NB; j++) begin : g_chk
    a_tag_in_range: assert property (@(posedge clk) disable iff (!rst_n)
      (in_valid && in_cnt[j] != '0) |-> (int'(in_tag[j]) < BINS));
    for (genvar q = j + 1; q < NB; q++) begin : g_pair
      a_tags_distinct: assert property (@(posedge clk) disable iff (!rst_n)
        (in_valid && in_cnt[j] != '0 && in_cnt[q] != '0) |-> (in_tag[j] != in_tag[q]));
    end
  end

endmodule
