// bezier_coordinate: one coordinate of a point on a cubic Bezier curve.
//
// With T = 2^T_BITS and u = T - t, the point at parameter t/T is
//   B = (u^3 p0 + 3 u^2 t p1 + 3 u t^2 p2 + t^3 p3) / T^3,
// the Bernstein form of the curve. The weights add up to T^3 exactly, so
// the result never leaves the range of the control points; the division
// is a shift and rounds down. t = 0 gives p0 exactly, t = T-1 a point
// one step short of p3, which is where the next curve of a path starts.
// Purely combinational. The curve form and sizes follow the original
// design; using T - t rather than T - 1 - t is this design's choice.
module bezier_coordinate
  import rave_pkg::*;
#(
  parameter int unsigned T_BITS = 10
) (
  input  logic [COORD_BITS-1:0] p0,
  input  logic [COORD_BITS-1:0] p1,
  input  logic [COORD_BITS-1:0] p2,
  input  logic [COORD_BITS-1:0] p3,
  input  logic [T_BITS-1:0]     t,
  output logic [COORD_BITS-1:0] out
);
  localparam int unsigned W = 3 * (T_BITS + 1) + COORD_BITS + 2;

  logic [W-1:0] tt, uu, w0, w1, w2, w3, acc;

  always_comb begin
    tt  = W'(t);
    uu  = W'(1) << T_BITS;
    uu  = uu - tt;
    w0  = uu * uu * uu;
    w1  = 3 * uu * uu * tt;
    w2  = 3 * uu * tt * tt;
    w3  = tt * tt * tt;
    acc = w0 * W'(p0) + w1 * W'(p1) + w2 * W'(p2) + w3 * W'(p3);
    out = COORD_BITS'(acc >> (3 * T_BITS));
  end
endmodule
