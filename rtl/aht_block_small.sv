// aht_block_small: block module of implementation (ix), "small inner Hough
// space".
//
// One block module serves one m x m block of the edge map for one angle.
// The image module streams the block's pixels in, one per cycle, together
// with the local Hough bin of that pixel position read from the angle's LHT
// table.  When vote is high and the pixel is an edge pixel, the counter of
// that local bin is incremented.  The inner Hough space therefore holds
// only local (LHT) votes; the global offset of the block (GHT) is added
// later, while the image module merges the inner spaces into the final
// Hough space.
//
// Interface: clear (one cycle) zeroes the inner space; vote/edge_bit/lbin
// are sampled on the rising clock edge, so a vote is visible on cnt in the
// next cycle.  cnt[b] is the number of edge pixels that fell in local bin b
// (at most m*m).  Reset also zeroes the inner space.
//
// The block's function follows the design; the bin count, counter width
// and the clear/vote handshake are this design's choices.
module aht_block_small
  import aht_pkg::*;
#(
  parameter int N = 256,
  parameter int K = 32
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 clear,
  input  logic                                 vote,
  input  logic                                 edge_bit,
  input  logic [$clog2(local_bins(N/K))-1:0]   lbin,
  output logic [$clog2((N/K)*(N/K)+1)-1:0]     cnt [local_bins(N/K)]
);

  localparam int M  = N / K;
  localparam int NB = local_bins(M);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NB; b++) cnt[b] <= '0;
    end else if (clear) begin
      for (int b = 0; b < NB; b++) cnt[b] <= '0;
    end else if (vote && edge_bit) begin
      cnt[lbin] <= cnt[lbin] + 1'b1;
    end
  end

endmodule
