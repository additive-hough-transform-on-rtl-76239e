// aht_image_module: Additive Hough Transform of the whole edge map for one
// angle.
//
// The image module holds k*k block modules, one per m x m block of the
// edge map, and the final Hough space of its angle.  One run goes through
// three phases, driven by the controller below:
//
//   CLEAR  one cycle: inner and final Hough spaces are zeroed.
//   VOTE   every block module walks through the m*m pixels of its block at
//          the same time, pixel p = j*m + i in cycle p (row by row).  A
//          block votes for each edge pixel, so the whole map is covered in
//          m*m cycles, whatever n is (block-level parallelism).
//   MERGE  the k*k inner Hough spaces are transferred, one block per cycle,
//          through a register stage into the final Hough space
//          (aht_hough_accum).
//
// VARIANT selects the block modules:
//   AHT_SMALL_INNER (ix): aht_block_small; the inner spaces hold local
//     votes, and the merge stage adds the block's GHT table entry to each
//     local bin number (the adder of the image module).
//   AHT_LARGE_INNER (x): aht_block_large; each block adds its GHT entry
//     itself while voting and the merge stage copies (count, index) pairs.
//   AHT_CORDIC (xi): aht_block_cordic; no tables, the angle is the run-time
//     input theta.  VOTE starts with one GHT computation and then spends
//     CORDIC_ITER+3 cycles per pixel.
//
// Interface: start (one cycle, while idle) begins a run on the edge_map
// present; edge_map and theta must stay constant until done.  busy is high
// during the run and done pulses for one cycle at its end.  Counting clock
// edges after the one that takes start, done rises on edge m*m + k*k + 2
// for the table variants (1 clear, m*m vote, k*k merge, 1 drain) and on
// edge (m*m+1)*(CORDIC_ITER+3) + k*k + 2 for the CORDIC variant; at the
// default size (m = 8, k = 32) that is 1090 and 2131 cycles.  rd_rho ->
// rd_count reads the final Hough space combinationally (index rho +
// RHO_OFF) and holds its contents until the next start.
//
// The split into image and block modules, the angle LUT sizes and the
// variants follow the design; the phase sequence, the one-block-per-cycle
// merge and all cycle counts are this design's choices.
module aht_image_module
  import aht_pkg::*;
#(
  parameter int           N       = 256,
  parameter int           K       = 32,
  parameter int           A       = 8,
  parameter int           ANGLE   = 0,
  parameter aht_variant_e VARIANT = AHT_LARGE_INNER
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  input  logic [N-1:0]                    edge_map [N],
  input  logic [ANG_W-1:0]                theta,
  output logic                            busy,
  output logic                            done,
  input  logic [$clog2(rho_bins(N))-1:0]  rd_rho,
  output logic [$clog2(N*N+1)-1:0]        rd_count
);

  localparam int M      = N / K;
  localparam int NBLK   = K * K;
  localparam int NPIX   = M * M;
  localparam int NB     = (VARIANT == AHT_CORDIC) ? cordic_bins(M) : local_bins(M);
  localparam int LB_W   = $clog2(local_bins(M));
  localparam int RHO_W  = $clog2(rho_bins(N));
  localparam int CNT_W  = $clog2(NPIX + 1);
  localparam int PIX_W  = $clog2(NPIX);
  localparam int MC_W   = $clog2(M);
  localparam int BLK_W  = $clog2(NBLK);
  localparam int PERIOD = (VARIANT == AHT_CORDIC) ? CORDIC_ITER + 3 : 1;
  localparam int PER_W  = $clog2(PERIOD + 1);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_GHT, S_VOTE, S_MERGE, S_DRAIN} state_e;

  state_e           state;
  logic [PIX_W-1:0] pix;
  logic [PER_W-1:0] wait_cnt;
  logic [BLK_W-1:0] blk;
  logic             clear_all;
  logic             vote;        // table variants: current pixel is voted
  logic             ght_go;      // CORDIC variant: start GHT computation
  logic             pix_go;      // CORDIC variant: start current pixel
  logic             last_pix, last_blk, period_end;

  assign last_pix   = (pix == PIX_W'(NPIX - 1));
  assign last_blk   = (blk == BLK_W'(NBLK - 1));
  assign period_end = (wait_cnt == PER_W'(PERIOD - 1));

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pix      <= '0;
      wait_cnt <= '0;
      blk      <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) state <= S_CLEAR;
        S_CLEAR: begin
          pix      <= '0;
          wait_cnt <= '0;
          blk      <= '0;
          state    <= (VARIANT == AHT_CORDIC) ? S_GHT : S_VOTE;
        end
        S_GHT: begin
          wait_cnt <= period_end ? '0 : wait_cnt + 1'b1;
          if (period_end) state <= S_VOTE;
        end
        S_VOTE: begin
          wait_cnt <= period_end ? '0 : wait_cnt + 1'b1;
          if (period_end) begin
            pix <= pix + 1'b1;
            if (last_pix) state <= S_MERGE;
          end
        end
        S_MERGE: begin
          blk <= blk + 1'b1;
          if (last_blk) state <= S_DRAIN;
        end
        S_DRAIN: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign clear_all = (state == S_CLEAR);
  assign vote      = (state == S_VOTE) && (VARIANT != AHT_CORDIC);
  assign ght_go    = (state == S_GHT)  && (wait_cnt == '0);
  assign pix_go    = (state == S_VOTE) && (VARIANT == AHT_CORDIC) && (wait_cnt == '0);

  // Pixel position inside every block: p = j*m + i.
  logic [MC_W-1:0] pi, pj;
  assign pi = MC_W'(pix % PIX_W'(M));
  assign pj = MC_W'(pix / PIX_W'(M));

  // ------------------------------------------------------------- angle LUTs
  logic [LB_W-1:0]  lht_data;
  logic [RHO_W-1:0] ght_data;
  logic [RHO_W-1:0] ght_all [NBLK];

  if (VARIANT != AHT_CORDIC) begin : g_luts
    aht_angle_luts #(.N(N), .K(K), .A(A), .ANGLE(ANGLE)) u_luts (
      .lht_addr (pix),
      .lht_data (lht_data),
      .ght_addr (blk),
      .ght_data (ght_data),
      .ght_all  (ght_all)
    );
  end else begin : g_no_luts
    assign lht_data = '0;
    assign ght_data = '0;
    for (genvar b = 0; b < NBLK; b++) begin : g_z
      assign ght_all[b] = '0;
    end
  end

  // ---------------------------------------------------------- block modules
  logic [CNT_W-1:0] blk_cnt [NBLK][NB];
  logic [RHO_W-1:0] blk_tag [NBLK][NB];

  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    localparam int BX = b % K;
    localparam int BY = b / K;
    // The pixel this block holds in the current cycle.
    logic edge_bit;
    assign edge_bit = edge_map[BY*M + int'(pj)][BX*M + int'(pi)];

    if (VARIANT == AHT_SMALL_INNER) begin : g_ix
      aht_block_small #(.N(N), .K(K)) u_blk (
        .clk      (clk),
        .rst_n    (rst_n),
        .clear    (clear_all),
        .vote     (vote),
        .edge_bit (edge_bit),
        .lbin     (lht_data),
        .cnt      (blk_cnt[b])
      );
      for (genvar j = 0; j < NB; j++) begin : g_t
        assign blk_tag[b][j] = '0;
      end
    end else if (VARIANT == AHT_LARGE_INNER) begin : g_x
      aht_block_large #(.N(N), .K(K)) u_blk (
        .clk      (clk),
        .rst_n    (rst_n),
        .clear    (clear_all),
        .vote     (vote),
        .edge_bit (edge_bit),
        .lbin     (lht_data),
        .ght      (ght_all[b]),
        .cnt      (blk_cnt[b]),
        .tag      (blk_tag[b])
      );
    end else begin : g_xi
      aht_block_cordic #(.N(N), .K(K), .BX(BX), .BY(BY)) u_blk (
        .clk      (clk),
        .rst_n    (rst_n),
        .clear    (clear_all),
        .theta    (theta),
        .ght_go   (ght_go),
        .pix_go   (pix_go),
        .edge_bit (edge_bit),
        .pix_i    (pi),
        .pix_j    (pj),
        .cnt      (blk_cnt[b]),
        .tag      (blk_tag[b])
      );
    end
  end

  // ------------------------------------------------------------------ merge
  // Stage 1 selects block blk and forms the final index of each bin; for
  // (ix) this is where the GHT entry is added.  Stage 2 is the accumulator.
  logic             m_valid;
  logic [CNT_W-1:0] m_cnt [NB];
  logic [RHO_W-1:0] m_tag [NB];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      for (int j = 0; j < NB; j++) begin
        m_cnt[j] <= '0;
        m_tag[j] <= '0;
      end
    end else begin
      m_valid <= (state == S_MERGE);
      for (int j = 0; j < NB; j++) begin
        m_cnt[j] <= blk_cnt[blk][j];
        if (VARIANT == AHT_SMALL_INNER) m_tag[j] <= ght_data + RHO_W'(j);
        else                            m_tag[j] <= blk_tag[blk][j];
      end
    end
  end

  aht_hough_accum #(.N(N), .NB(NB), .CNT_W(CNT_W)) u_hs (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (clear_all),
    .in_valid (m_valid),
    .in_cnt   (m_cnt),
    .in_tag   (m_tag),
    .rd_addr  (rd_rho),
    .rd_data  (rd_count)
  );

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (state == S_IDLE));

endmodule
