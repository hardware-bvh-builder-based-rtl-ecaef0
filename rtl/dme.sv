// dme: distance metric evaluator.
//
// Computes the PLOC distance between two clusters: the surface area of the
// smallest box that encloses both. The union box is formed with per-axis
// min/max, its extents dx, dy, dz are taken, and dx*dy + dy*dz + dz*dx (half
// the surface area, which orders boxes exactly as the full area does) is
// returned. With 15-bit coordinates the result always fits 32 bits.
//
// If either side holds no cluster (a_valid or b_valid low) the output is the
// largest distance, so an empty buffer slot can never be picked as a
// neighbour. Purely combinational; the sweep unit uses R of these in parallel.
module dme
  import ploc_pkg::*;
(
  input  aabb_t a,
  input  logic  a_valid,
  input  aabb_t b,
  input  logic  b_valid,
  output dist_t distance
);

  aabb_t             u;
  logic [COORD_W-1:0] dx, dy, dz;
  logic [DIST_W-1:0]  area;

  always_comb begin
    u    = aabb_union(a, b);
    dx   = u.hi_x - u.lo_x;
    dy   = u.hi_y - u.lo_y;
    dz   = u.hi_z - u.lo_z;
    area = DIST_W'(dx * dy) + DIST_W'(dy * dz) + DIST_W'(dz * dx);
    distance = (a_valid && b_valid) ? area : DIST_MAX;
  end

endmodule
