// ppu_overlap: overlap amount calculator for two square objects.
//
// Objects are squares given by their centre (x, y, unsigned 8.8) and side
// length (5-bit integer). For each axis it forms the centre distance
// d = |A - B| and the overlap a = (sideA + sideB)/2 - d, clamped at zero;
// both are unsigned 8.8. The push directions are the two comparisons of the
// centres: dir_x = (Ax < Bx) and dir_y = (Ay > By). Purely combinational: a
// few subtractors, adders, comparators and an absolute value.
//
// Subtractors for a/b and dx/dy and the two direction comparators follow the
// design's collision diagram; taking x, y as the centre and clamping a
// negative overlap to zero are this implementation's reading.
module ppu_overlap
  import ppu_pkg::*;
(
  input  upos_t      ax, ay,
  input  logic [4:0] as_,
  input  upos_t      bx, by,
  input  logic [4:0] bs,
  output ufix_t      a,       // overlap along x
  output ufix_t      b,       // overlap along y
  output ufix_t      dx,      // |Ax - Bx|
  output ufix_t      dy,      // |Ay - By|
  output logic       dir_x,   // Ax < Bx
  output logic       dir_y    // Ay > By
);

  logic [16:0] half_sum;   // (As + Bs) / 2 in 8.8

  always_comb begin
    dir_x    = ax < bx;
    dir_y    = ay > by;
    dx       = dir_x ? (bx - ax) : (ax - bx);
    dy       = dir_y ? (ay - by) : (by - ay);
    half_sum = {4'd0, 6'(6'(as_) + 6'(bs)), 7'd0};
    a        = (half_sum > {1'b0, dx}) ? 16'(half_sum - {1'b0, dx}) : 16'd0;
    b        = (half_sum > {1'b0, dy}) ? 16'(half_sum - {1'b0, dy}) : 16'd0;
  end

endmodule
