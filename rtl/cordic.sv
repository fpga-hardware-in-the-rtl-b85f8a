// cordic: Cartesian-to-polar conversion of the stator flux vector by the
// CORDIC algorithm in vectoring mode.
//
// A pre-rotation stage turns vectors of the left half-plane by +/-90 degrees
// so that all angles in (-pi, pi] converge. Then N_ITER micro-rotations
// drive y to zero: at step i the vector is turned by -/+atan(2^-i) according
// to the sign of y, using only shifts and adds:
//   x' = x + d*y*2^-i,  y' = y - d*x*2^-i,  z' = z + d*atan(2^-i),  d = sign(y).
// The magnitude comes out multiplied by the CORDIC gain 1/Zn (1.6468 for 10
// iterations); the caller multiplies by Zn = 0.6073, as the design does
// outside its CORDIC. The angle is in radians.
//
// The micro-rotation equations, ten iterations and the 16-bit ports follow
// the design. The fully unrolled pipeline (one stage per iteration plus the
// pre-rotation), the guard bits and the port scaling (CF fraction bits for
// both flux and radians) are this design's choices. Interface: signed
// CW-bit inputs and outputs with CF fraction bits. Timing: one result per
// enabled cycle; latency N_ITER+1 enabled cycles (11 by default).
module cordic
  import dtc_pkg::*;
#(
  parameter int N_ITER = 10,  // number of micro-rotations
  parameter int W      = 16,  // port width
  parameter int FB     = 12,  // port fraction bits (angle in radians)
  parameter int G      = 4    // internal guard fraction bits
)(
  input  logic                clk,
  input  logic                rst,
  input  logic                ce,
  input  logic signed [W-1:0] qsd,        // x input
  input  logic signed [W-1:0] qsq,        // y input
  output logic signed [W-1:0] magnitude,  // sqrt(x^2+y^2) / Zn
  output logic signed [W-1:0] angle_q     // atan2(y, x), rad
);

  localparam int IW = W + 2 + G;  // 1 bit for the gain, 1 for the pre-rotation

  typedef logic signed [IW-1:0] iw_t;

  function automatic iw_t atan_k(int i);
    return iw_t'(longint'($atan(2.0 ** (-i)) * (2.0 ** (FB + G)) + 0.5));
  endfunction

  localparam iw_t HALF_PI = iw_t'(longint'(1.5707963267948966 * (2.0 ** (FB + G)) + 0.5));

  iw_t xs [N_ITER+1];
  iw_t ys [N_ITER+1];
  iw_t zs [N_ITER+1];

  iw_t x_in, y_in;
  assign x_in = iw_t'(qsd) <<< G;
  assign y_in = iw_t'(qsq) <<< G;

  // Stage 0: bring the vector into the right half-plane.
  always_ff @(posedge clk) begin
    if (rst) begin
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
    end else if (ce) begin
      if (x_in < 0) begin
        if (y_in >= 0) begin
          xs[0] <= y_in;
          ys[0] <= -x_in;
          zs[0] <= HALF_PI;
        end else begin
          xs[0] <= -y_in;
          ys[0] <= x_in;
          zs[0] <= -HALF_PI;
        end
      end else begin
        xs[0] <= x_in;
        ys[0] <= y_in;
        zs[0] <= '0;
      end
    end
  end

  // Stages 1..N_ITER: micro-rotations.
  for (genvar i = 0; i < N_ITER; i++) begin : g_rot
    localparam iw_t ATAN_I = atan_k(i);
    always_ff @(posedge clk) begin
      if (rst) begin
        xs[i+1] <= '0;
        ys[i+1] <= '0;
        zs[i+1] <= '0;
      end else if (ce) begin
        if (ys[i] >= 0) begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + ATAN_I;
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - ATAN_I;
        end
      end
    end
  end

  // Drop the guard bits, saturating the magnitude to the port range.
  localparam iw_t MAG_MAX = iw_t'((longint'(1) <<< (W - 1)) - 1) <<< G;

  always_comb begin
    if (xs[N_ITER] > MAG_MAX) magnitude = {1'b0, {(W-1){1'b1}}};
    else                      magnitude = W'(xs[N_ITER] >>> G);
    angle_q = W'(zs[N_ITER] >>> G);
  end

endmodule
