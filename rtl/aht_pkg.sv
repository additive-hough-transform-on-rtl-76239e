// aht_pkg: types, sizes and table functions shared by the Additive Hough
// Transform (AHT) accelerator.
//
// The AHT splits an n x n binary edge map into k x k blocks of m x m pixels.
// For a pixel P inside a block whose local origin is L, the Hough value
// rho = x*cos(theta) + y*sin(theta) is split as
//     rho(P) = LHT(P, L) + GHT(L),
// the local Hough transform of P relative to L plus the global Hough
// transform of L relative to the image origin.  Every block can then vote
// in parallel with the same small table of local values.
//
// Quantisation (this design's choice): LHT and GHT are each rounded to the
// nearest integer before they are added, so the final rho index is
//     round(i*cos + j*sin) + round(m*(bx*cos + by*sin)) + RHO_OFF
// with (i, j) the column/row inside the block and (bx, by) the block
// column/row.  Angle a of A is theta_a = a * 180deg / A.
//
// The table functions below use real arithmetic and are only evaluated at
// elaboration time, to fill constant look-up tables.
package aht_pkg;

  // The three hardware variants proposed for reconfigurable platforms.
  typedef enum logic [1:0] {
    AHT_SMALL_INNER = 2'd0,  // (ix)  inner spaces hold LHT votes, GHT added while merging
    AHT_LARGE_INNER = 2'd1,  // (x)   inner spaces hold final-rho votes
    AHT_CORDIC      = 2'd2   // (xi)  as (x), LHT and GHT from CORDIC, angle set at run time
  } aht_variant_e;

  localparam real PI = 3.14159265358979323846;

  // Binary angle measure: 2**ANG_W units per full turn.
  localparam int ANG_W = 16;

  // CORDIC fixed point: fractional bits of coordinates and results.
  localparam int CORDIC_FRAC = 8;
  localparam int CORDIC_ITER = 14;

  // Round half up.
  function automatic int rnd(real v);
    return $rtoi($floor(v + 0.5));
  endfunction

  function automatic real theta_rad(int a, int num_angles);
    return a * PI / num_angles;
  endfunction

  // Binary-angle code of angle a (used to drive the run-time angle of the
  // CORDIC variant with the same angles as the table variants).
  function automatic int theta_bam(int a, int num_angles);
    return (a * (1 << (ANG_W - 1))) / num_angles;
  endfunction

  // Offset added to rho so that every index is non-negative; rho >= -(n-1).
  function automatic int rho_off(int n);
    return n;
  endfunction

  // Number of final Hough-space bins per angle: rho spans
  // [-(n-1), (n-1)*sqrt(2)], plus one bin of margin on each side.
  function automatic int rho_bins(int n);
    return n + ((n - 1) * 1415 + 999) / 1000 + 2;
  endfunction

  // Bins of a small inner Hough space (table variants): the local rho of an
  // m x m block spans at most (m-1)*sqrt(2) for one angle.
  function automatic int local_bins(int m);
    return ((m - 1) * 1415 + 999) / 1000 + 2;
  endfunction

  // Bins of a CORDIC-variant inner space: the block does not know the angle
  // at elaboration, so its window covers [-(m-1)-1, (m-1)*sqrt(2)+1]
  // around round(GHT).
  function automatic int cordic_bins(int m);
    return ((m - 1) * 2415 + 999) / 1000 + 3;
  endfunction

  // Rounded local Hough value of pixel (i, j) of a block, angle a.
  function automatic int lht_q(int a, int num_angles, int i, int j);
    real t;
    t = theta_rad(a, num_angles);
    return rnd(i * $cos(t) + j * $sin(t));
  endfunction

  // Smallest rounded local value over the block, angle a.
  function automatic int lht_min(int a, int num_angles, int m);
    int mn;
    mn = 0;
    for (int j = 0; j < m; j++)
      for (int i = 0; i < m; i++)
        if (lht_q(a, num_angles, i, j) < mn) mn = lht_q(a, num_angles, i, j);
    return mn;
  endfunction

  // LHT table entry: local bin of pixel (i, j), 0 .. local_bins(m)-1.
  // lmin is lht_min(a, num_angles, m), passed in so that it is computed once.
  function automatic int lht_bin(int a, int num_angles, int lmin, int i, int j);
    return lht_q(a, num_angles, i, j) - lmin;
  endfunction

  // GHT table entry: final-space index of local bin 0 of block (bx, by),
  // i.e. round(GHT) + lht_min + RHO_OFF.
  function automatic int ght_base(int a, int num_angles, int n, int m, int lmin, int bx, int by);
    real t;
    t = theta_rad(a, num_angles);
    return rnd(m * (bx * $cos(t) + by * $sin(t))) + lmin + rho_off(n);
  endfunction

  // CORDIC arctangent table, atan(2**-i) in binary-angle units.
  function automatic int cordic_atan(int i);
    return rnd($atan(2.0 ** (-i)) / (2.0 * PI) * (2.0 ** ANG_W));
  endfunction

  // 1/K, the inverse CORDIC gain after CORDIC_ITER iterations, in Q0.16.
  function automatic int cordic_kinv();
    real k;
    k = 1.0;
    for (int i = 0; i < CORDIC_ITER; i++) k = k * $sqrt(1.0 + 2.0 ** (-2 * i));
    return rnd((2.0 ** 16) / k);
  endfunction

endpackage
