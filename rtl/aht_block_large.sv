// aht_block_large: block module of implementation (x), "large inner Hough
// space".
//
// Like aht_block_small, the block receives its pixels one per cycle with
// the local bin of each position from the angle's LHT table.  In addition
// it holds the GHT entry of its own block (the final Hough-space index of
// its local bin 0) and adds it to the local bin of every edge pixel, so it
// computes the final Hough index of each vote itself.  Each bin of the
// inner space stores that final index (tag) next to its vote count, which
// makes the inner space larger than in implementation (ix), but lets the
// image module copy bins into the final Hough space without any further
// addition.
//
// Interface: clear (one cycle) zeroes the counts; vote/edge_bit/lbin are
// sampled on the rising edge and update cnt/tag in the next cycle.  tag[b]
// is meaningful only while cnt[b] is non-zero.  Reset zeroes counts and tags.
//
// The block's function follows the design; storing the final index per
// bin, the widths and the handshake are this design's choices.
module aht_block_large
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
  input  logic [$clog2(rho_bins(N))-1:0]       ght,
  output logic [$clog2((N/K)*(N/K)+1)-1:0]     cnt [local_bins(N/K)],
  output logic [$clog2(rho_bins(N))-1:0]       tag [local_bins(N/K)]
);

  localparam int M     = N / K;
  localparam int NB    = local_bins(M);
  localparam int RHO_W = $clog2(rho_bins(N));

  // Final Hough index of the current pixel: LHT + GHT.
  logic [RHO_W-1:0] rho;
  assign rho = ght + RHO_W'(lbin);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NB; b++) begin
        cnt[b] <= '0;
        tag[b] <= '0;
      end
    end else if (clear) begin
      for (int b = 0; b < NB; b++) cnt[b] <= '0;
    end else if (vote && edge_bit) begin
      cnt[lbin] <= cnt[lbin] + 1'b1;
      tag[lbin] <= rho;
    end
  end

endmodule
