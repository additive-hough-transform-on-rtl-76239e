// aht_cordic: iterative CORDIC that computes rho = x*cos(theta) + y*sin(theta).
//
// Used by the block modules of implementation (xi), where the angle is only
// known at run time and no sine/cosine tables exist.  The engine works in
// rotation mode: it rotates the vector (x, y) by -theta with shift-and-add
// micro-rotations, so the x component ends as K*(x*cos + y*sin), and then
// multiplies by the constant 1/K.
//
// Angles are binary angle codes of ANG_W bits (2**ANG_W per full turn) in
// the half turn [0, 180deg).  An angle of 90deg or more is first rotated by
// -90deg exactly ((x, y) -> (y, -x)), which leaves a residual angle in
// [0, 90deg), inside the CORDIC convergence range.
//
// Timing: start is accepted on a clock edge while the engine is idle
// (ignored while busy); CORDIC_ITER iteration edges and one gain-correction
// edge follow, so done rises on the CORDIC_ITER+1-th edge after the
// accepting one (15 with the default 14 iterations) and lasts one cycle.
// result stays valid until the next start.  result is signed with
// CORDIC_FRAC fractional bits.
//
// The use of CORDIC follows the design; iteration count, word widths,
// binary angle format and the -90deg pre-rotation are this design's
// choices.
module aht_cordic
  import aht_pkg::*;
#(
  parameter int XY_W = 10,                         // signed input coordinate width
  parameter int W    = XY_W + CORDIC_FRAC + 3      // internal/result width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [XY_W-1:0] x_in,
  input  logic signed [XY_W-1:0] y_in,
  input  logic [ANG_W-1:0]       theta,
  output logic                   busy,
  output logic                   done,
  output logic signed [W-1:0]    result
);

  localparam int ITER    = CORDIC_ITER;
  localparam int CNT_W   = $clog2(ITER + 2);
  localparam int KINV    = cordic_kinv();
  localparam logic [ANG_W-1:0] QUARTER = ANG_W'(1) << (ANG_W - 2);

  typedef logic signed [ANG_W:0] ang_t;

  function automatic ang_t atan_entry(int i);
    return ang_t'(cordic_atan(i));
  endfunction

  ang_t atan_rom [ITER];
  for (genvar i = 0; i < ITER; i++) begin : g_atan
    localparam ang_t VAL = atan_entry(i);
    assign atan_rom[i] = VAL;
  end

  logic signed [W-1:0] xr, yr;
  ang_t                zr;
  logic [CNT_W-1:0]    step;

  logic signed [W-1:0] x_scaled, y_scaled;
  assign x_scaled = W'(x_in) <<< CORDIC_FRAC;
  assign y_scaled = W'(y_in) <<< CORDIC_FRAC;

  // Gain correction: xr * (1/K), 1/K in Q0.16.
  logic signed [W+17:0] prod;
  assign prod = (W+18)'(xr) * (W+18)'($signed({1'b0, 17'(KINV)}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr     <= '0;
      yr     <= '0;
      zr     <= '0;
      step   <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          step <= '0;
          if (theta >= QUARTER) begin
            xr <= y_scaled;
            yr <= -x_scaled;
            zr <= -ang_t'({1'b0, theta - QUARTER});
          end else begin
            xr <= x_scaled;
            yr <= y_scaled;
            zr <= -ang_t'({1'b0, theta});
          end
        end
      end else if (step < CNT_W'(ITER)) begin
        if (zr < 0) begin
          xr <= xr + (yr >>> step);
          yr <= yr - (xr >>> step);
          zr <= zr + atan_rom[step];
        end else begin
          xr <= xr - (yr >>> step);
          yr <= yr + (xr >>> step);
          zr <= zr - atan_rom[step];
        end
        step <= step + 1'b1;
      end else begin
        result <= W'(prod >>> 16);
        busy   <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

endmodule
