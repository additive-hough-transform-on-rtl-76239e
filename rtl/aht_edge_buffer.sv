// aht_edge_buffer: storage for the n x n binary edge map that every image
// module reads.
//
// The map is written one image row per cycle: when wr_en is high, row
// wr_row takes wr_data (bit x of wr_data is the pixel in column x).  All n
// rows are visible at once on edge_map, so the k x k block modules of all
// angles can take their m x m blocks from it in parallel.  A row written in
// cycle t is visible from cycle t+1.  Reset clears the map.
//
// The accelerator receives the complete edge map, as the design requires;
// the row-per-cycle write port and the reset clear are this design's
// choices.
module aht_edge_buffer #(
  parameter int N = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] wr_row,
  input  logic [N-1:0]         wr_data,
  output logic [N-1:0]         edge_map [N]
);

  logic [N-1:0] rows [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++) rows[r] <= '0;
    end else if (wr_en) begin
      rows[wr_row] <= wr_data;
    end
  end

  assign edge_map = rows;

endmodule
