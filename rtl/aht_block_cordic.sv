// aht_block_cordic: block module of implementation (xi), CORDIC-based AHT.
//
// Works like aht_block_large (every vote carries its final Hough index),
// but it needs no tables: the angle arrives at run time on theta and the
// block computes both parts of the additive Hough value with its own
// CORDIC engine:
//   * ght_go: GHT of the block origin, (BX*m)*cos + (BY*m)*sin, kept in
//     fixed point;
//   * pix_go: for an edge pixel at local position (pix_i, pix_j) the LHT
//     i*cos + j*sin; the final value GHT + LHT is rounded to the nearest
//     integer rho, and the inner-space bin (rho - round(GHT) + m) counts
//     the vote and records the final index rho + RHO_OFF as its tag.
// Non-edge pixels start no CORDIC run.
//
// Timing: a go starts one CORDIC run; its done comes CORDIC_ITER+1 edges
// later and the vote lands on cnt/tag on the edge after that.  The next go
// must therefore come at least CORDIC_ITER+3 cycles after the previous one
// (the image module uses exactly that).  clear zeroes the counts.
//
// That block modules of (xi) compute the LHT with CORDIC engines follows the
// design; computing the GHT with the same engine, adding in fixed point
// before rounding, and the bin window are this design's choices.
module aht_block_cordic
  import aht_pkg::*;
#(
  parameter int N  = 256,
  parameter int K  = 32,
  parameter int BX = 0,                  // block column
  parameter int BY = 0                   // block row
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 clear,
  input  logic [ANG_W-1:0]                     theta,
  input  logic                                 ght_go,
  input  logic                                 pix_go,
  input  logic                                 edge_bit,
  input  logic [$clog2(N/K)-1:0]               pix_i,
  input  logic [$clog2(N/K)-1:0]               pix_j,
  output logic [$clog2((N/K)*(N/K)+1)-1:0]     cnt [cordic_bins(N/K)],
  output logic [$clog2(rho_bins(N))-1:0]       tag [cordic_bins(N/K)]
);

  localparam int M     = N / K;
  localparam int NB    = cordic_bins(M);
  localparam int RHO_W = $clog2(rho_bins(N));
  localparam int XY_W  = $clog2(N) + 2;
  localparam int W     = XY_W + CORDIC_FRAC + 3;
  localparam int SLOT_W = $clog2(NB);

  typedef enum logic [1:0] {OP_NONE, OP_GHT, OP_LHT} op_e;

  logic                   cs_start, cs_busy, cs_done;
  logic signed [XY_W-1:0] cs_x, cs_y;
  logic signed [W-1:0]    cs_result;
  op_e                    op;
  logic signed [W-1:0]    ght_fx;

  aht_cordic #(.XY_W(XY_W), .W(W)) u_cordic (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (cs_start),
    .x_in   (cs_x),
    .y_in   (cs_y),
    .theta  (theta),
    .busy   (cs_busy),
    .done   (cs_done),
    .result (cs_result)
  );

  always_comb begin
    cs_start = 1'b0;
    cs_x     = '0;
    cs_y     = '0;
    if (ght_go) begin
      cs_start = 1'b1;
      cs_x     = XY_W'(BX * M);
      cs_y     = XY_W'(BY * M);
    end else if (pix_go && edge_bit) begin
      cs_start = 1'b1;
      cs_x     = XY_W'(pix_i);
      cs_y     = XY_W'(pix_j);
    end
  end

  // Rounded GHT and final rho of the finishing LHT run.
  logic signed [W-1:0] half, ght_q, rho_fx, rho_q, slot_s;
  assign half   = W'(1) <<< (CORDIC_FRAC - 1);
  assign ght_q  = (ght_fx + half) >>> CORDIC_FRAC;
  assign rho_fx = ght_fx + cs_result;
  assign rho_q  = (rho_fx + half) >>> CORDIC_FRAC;
  assign slot_s = rho_q - ght_q + W'(M);

  logic [SLOT_W-1:0] slot;
  assign slot = SLOT_W'(slot_s);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op     <= OP_NONE;
      ght_fx <= '0;
      for (int b = 0; b < NB; b++) begin
        cnt[b] <= '0;
        tag[b] <= '0;
      end
    end else begin
      if (clear) begin
        for (int b = 0; b < NB; b++) cnt[b] <= '0;
      end
      if (cs_start && !cs_busy) begin
        op <= ght_go ? OP_GHT : OP_LHT;
      end else if (cs_done) begin
        op <= OP_NONE;
        if (op == OP_GHT) begin
          ght_fx <= cs_result;
        end else if (op == OP_LHT) begin
          cnt[slot] <= cnt[slot] + 1'b1;
          tag[slot] <= RHO_W'(rho_q + W'(rho_off(N)));
        end
      end
    end
  end

  // The bin window covers every value the rounded sum can take.
  a_slot_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (cs_done && op == OP_LHT) |-> (slot_s >= 0 && slot_s < W'(NB)));

endmodule
