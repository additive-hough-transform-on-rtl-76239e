// aht_top: Additive Hough Transform accelerator for an n x n binary edge
// map and A angles.
//
// The edge map is written into aht_edge_buffer one row per cycle.  A start
// pulse then launches all A image modules at once (angle-level
// parallelism); each holds k*k block modules that process their m x m
// blocks at the same time (block-level parallelism) and merge them into the
// angle's final Hough space.  The image modules run in lockstep, so done is
// taken from angle 0 and busy from all of them.  After done, the Hough space
// is read through rd_angle/rd_rho -> rd_count (combinational); rd_rho is
// rho + RHO_OFF with RHO_OFF = n, and angle a stands for
// theta = a * 180deg / A.
//
// VARIANT selects implementation (ix) small inner spaces, (x) large inner
// spaces (the default) or (xi) CORDIC.  For (xi) the angles are taken at
// run time from theta[a] (binary angle, 2**16 per turn, below half a turn);
// the table variants ignore theta.
//
// Interface timing: wr_* may be used whenever the accelerator is idle; the
// edge map must not be written while busy.  Run length is given in
// aht_image_module.
//
// Image modules per angle, block modules per block and the default sizes
// n = 256, k = 32 (m = 8) follow the design; A = 8, the write port and the
// readout port are this design's choices.
module aht_top
  import aht_pkg::*;
#(
  parameter int           N       = 256,
  parameter int           K       = 32,
  parameter int           A       = 8,
  parameter aht_variant_e VARIANT = AHT_LARGE_INNER
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            wr_en,
  input  logic [$clog2(N)-1:0]            wr_row,
  input  logic [N-1:0]                    wr_data,
  input  logic                            start,
  input  logic [ANG_W-1:0]                theta [A],
  output logic                            busy,
  output logic                            done,
  input  logic [$clog2(A)-1:0]            rd_angle,
  input  logic [$clog2(rho_bins(N))-1:0]  rd_rho,
  output logic [$clog2(N*N+1)-1:0]        rd_count
);

  localparam int HS_W = $clog2(N*N+1);

  logic [N-1:0]    edge_map [N];
  logic [A-1:0]    busy_a, done_a;
  logic [HS_W-1:0] count_a [A];

  aht_edge_buffer #(.N(N)) u_edges (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (wr_en && !busy),
    .wr_row   (wr_row),
    .wr_data  (wr_data),
    .edge_map (edge_map)
  );

  for (genvar a = 0; a < A; a++) begin : g_angle
    aht_image_module #(.N(N), .K(K), .A(A), .ANGLE(a), .VARIANT(VARIANT)) u_img (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (start && !busy),
      .edge_map (edge_map),
      .theta    (theta[a]),
      .busy     (busy_a[a]),
      .done     (done_a[a]),
      .rd_rho   (rd_rho),
      .rd_count (count_a[a])
    );
  end

  assign busy     = |busy_a;
  assign done     = done_a[0];
  assign rd_count = (int'(rd_angle) < A) ? count_a[rd_angle] : '0;

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (busy_a == '0) || (busy_a == '1));

endmodule
