// aht_angle_luts: the two constant look-up tables of one angle.
//
// LHT table (m*m entries): local Hough bin of every pixel position inside a
// block, indexed by the pixel number p = j*m + i (i = column, j = row inside
// the block).  The entry is round(i*cos + j*sin) - lht_min, so it is a
// non-negative bin index of a small inner Hough space.  One table serves
// all k*k blocks of the angle, because every block holds the same pixel
// position in the same cycle.
//
// GHT table (k*k entries): for block b = by*k + bx, the final Hough-space
// index of local bin 0, round(m*(bx*cos + by*sin)) + lht_min + RHO_OFF.
// The table is read through a port (implementation ix, which adds it while
// merging) and is also brought out whole on ght_all (implementation x, where
// every block module adds its own entry while voting).
//
// Table sizes follow the design's (m^2 + k^2) entries per angle.  Reads are
// combinational.  The contents are computed at elaboration from the angle
// theta = ANGLE * 180deg / A (see aht_pkg).  Being a ROM, ght_all is a set
// of constants: in synthesis the tables fold into the logic that reads them.
module aht_angle_luts
  import aht_pkg::*;
#(
  parameter int N     = 256,
  parameter int K     = 32,
  parameter int A     = 8,
  parameter int ANGLE = 0
) (
  input  logic [$clog2((N/K)*(N/K))-1:0]   lht_addr,
  output logic [$clog2(local_bins(N/K))-1:0] lht_data,
  input  logic [$clog2(K*K)-1:0]            ght_addr,
  output logic [$clog2(rho_bins(N))-1:0]    ght_data,
  output logic [$clog2(rho_bins(N))-1:0]    ght_all [K*K]
);

  localparam int M     = N / K;
  localparam int LB_W  = $clog2(local_bins(M));
  localparam int RHO_W = $clog2(rho_bins(N));
  localparam int LMIN  = lht_min(ANGLE, A, M);

  typedef logic [LB_W-1:0]  lbin_t;
  typedef logic [RHO_W-1:0] rho_t;

  function automatic lbin_t lht_entry(int p);
    return lbin_t'(lht_bin(ANGLE, A, LMIN, p % M, p / M));
  endfunction

  function automatic rho_t ght_entry(int b);
    return rho_t'(ght_base(ANGLE, A, N, M, LMIN, b % K, b / K));
  endfunction

  lbin_t lht_rom [M*M];
  rho_t  ght_rom [K*K];

  for (genvar p = 0; p < M*M; p++) begin : g_lht
    localparam lbin_t VAL = lht_entry(p);
    assign lht_rom[p] = VAL;
  end
  for (genvar b = 0; b < K*K; b++) begin : g_ght
    localparam rho_t VAL = ght_entry(b);
    assign ght_rom[b] = VAL;
  end

  assign lht_data = lht_rom[lht_addr];
  assign ght_data = ght_rom[ght_addr];
  assign ght_all  = ght_rom;

endmodule
