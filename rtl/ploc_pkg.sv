// ploc_pkg: types and constants shared by the PLOC++ BVH builder.
//
// A cluster is an axis-aligned bounding box (AABB) plus the identifier of the
// BVH node it stands for. Leaves carry the primitive index (MSB clear);
// internal nodes carry an identifier made by the sweep unit that created
// them (MSB set, then the unit number, then a per-unit counter).
//
// Coordinates are unsigned integers of COORD_W bits, i.e. the scene is assumed
// quantised to a 2^15 grid before it reaches the hardware. With 15 bits the
// half surface area dx*dy + dy*dz + dz*dx of any box is below 2^32, so the
// distance used by the nearest-neighbour search fits the 32-bit distance field
// of the search key exactly. The number format is this design's choice.
//
// The search key packs the distance above the neighbour offset so that one
// unsigned comparison orders by distance first and breaks ties by the lower
// neighbour index. Offsets -R..+R are stored biased by +R.
package ploc_pkg;

  localparam int unsigned COORD_W = 15;
  localparam int unsigned DIST_W  = 32;
  localparam int unsigned ID_W    = 32;
  localparam int unsigned UNIT_W  = 8;   // unit field of an internal node id
  localparam int unsigned CNT_W   = ID_W - 1 - UNIT_W;

  localparam logic [DIST_W-1:0] DIST_MAX = '1;

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [DIST_W-1:0]  dist_t;
  typedef logic [ID_W-1:0]    node_id_t;

  typedef struct packed {
    coord_t lo_x, lo_y, lo_z;
    coord_t hi_x, hi_y, hi_z;
  } aabb_t;

  typedef struct packed {
    node_id_t id;
    aabb_t    box;
  } cluster_t;

  // One internal BVH node as written out by a merge.
  typedef struct packed {
    node_id_t id;
    node_id_t left;
    node_id_t right;
    aabb_t    box;
  } bvh_node_t;

  function automatic coord_t cmin(coord_t a, coord_t b);
    return (a < b) ? a : b;
  endfunction

  function automatic coord_t cmax(coord_t a, coord_t b);
    return (a > b) ? a : b;
  endfunction

  // Smallest box enclosing both arguments.
  function automatic aabb_t aabb_union(aabb_t a, aabb_t b);
    aabb_t u;
    u.lo_x = cmin(a.lo_x, b.lo_x);
    u.lo_y = cmin(a.lo_y, b.lo_y);
    u.lo_z = cmin(a.lo_z, b.lo_z);
    u.hi_x = cmax(a.hi_x, b.hi_x);
    u.hi_y = cmax(a.hi_y, b.hi_y);
    u.hi_z = cmax(a.hi_z, b.hi_z);
    return u;
  endfunction

endpackage
