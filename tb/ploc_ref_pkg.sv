// ploc_ref_pkg: reference model of a PLOC sweep, for the testbenches.
//
// Written independently of the RTL, in plain array form: for every cluster i
// of the sequence the nearest neighbour j in [i-R, i+R] is the one with the
// smallest half surface area of the union box, ties to the lower index.
// Mutually nearest pairs merge into the lower position (new internal node
// ids numbered in increasing position order), partners are dropped, the
// rest are kept in order.
package ploc_ref_pkg;
  import ploc_pkg::*;

  function automatic longint unsigned ref_area(aabb_t a, aabb_t b);
    longint unsigned lx, ly, lz, hx, hy, hz, dx, dy, dz;
    lx = (a.lo_x < b.lo_x) ? a.lo_x : b.lo_x;
    ly = (a.lo_y < b.lo_y) ? a.lo_y : b.lo_y;
    lz = (a.lo_z < b.lo_z) ? a.lo_z : b.lo_z;
    hx = (a.hi_x > b.hi_x) ? a.hi_x : b.hi_x;
    hy = (a.hi_y > b.hi_y) ? a.hi_y : b.hi_y;
    hz = (a.hi_z > b.hi_z) ? a.hi_z : b.hi_z;
    dx = hx - lx; dy = hy - ly; dz = hz - lz;
    return dx * dy + dy * dz + dz * dx;
  endfunction

  // One sweep over seq. Node ids are {1, unit, counter}; cnt is advanced.
  function automatic void ref_pass(input cluster_t seq[$], input int r_search,
                                   input int unit, inout int cnt,
                                   output cluster_t out[$], output bvh_node_t nodes[$]);
    int n = seq.size();
    int nn[];
    bit gone[];
    nn = new[n];
    gone = new[n];
    out = {};
    nodes = {};
    for (int i = 0; i < n; i++) begin
      longint unsigned best = 64'hFFFF_FFFF_FFFF_FFFF;
      nn[i] = -1;
      for (int j = i - r_search; j <= i + r_search; j++) begin
        if (j < 0 || j >= n || j == i) continue;
        if (ref_area(seq[i].box, seq[j].box) < best) begin
          best = ref_area(seq[i].box, seq[j].box);
          nn[i] = j;
        end
      end
    end
    for (int i = 0; i < n; i++) begin
      if (gone[i]) continue;
      if (nn[i] > i && nn[nn[i]] == i) begin
        cluster_t  m;
        bvh_node_t nd;
        m.id = {1'b1, UNIT_W'(unit), CNT_W'(cnt)};
        m.box.lo_x = (seq[i].box.lo_x < seq[nn[i]].box.lo_x) ? seq[i].box.lo_x : seq[nn[i]].box.lo_x;
        m.box.lo_y = (seq[i].box.lo_y < seq[nn[i]].box.lo_y) ? seq[i].box.lo_y : seq[nn[i]].box.lo_y;
        m.box.lo_z = (seq[i].box.lo_z < seq[nn[i]].box.lo_z) ? seq[i].box.lo_z : seq[nn[i]].box.lo_z;
        m.box.hi_x = (seq[i].box.hi_x > seq[nn[i]].box.hi_x) ? seq[i].box.hi_x : seq[nn[i]].box.hi_x;
        m.box.hi_y = (seq[i].box.hi_y > seq[nn[i]].box.hi_y) ? seq[i].box.hi_y : seq[nn[i]].box.hi_y;
        m.box.hi_z = (seq[i].box.hi_z > seq[nn[i]].box.hi_z) ? seq[i].box.hi_z : seq[nn[i]].box.hi_z;
        nd.id = m.id; nd.left = seq[i].id; nd.right = seq[nn[i]].id; nd.box = m.box;
        cnt++;
        gone[nn[i]] = 1;
        out.push_back(m);
        nodes.push_back(nd);
      end else begin
        out.push_back(seq[i]);
      end
    end
  endfunction

  // A random primitive box near a point that drifts with the index, so that
  // nearby indices are nearby in space, as after a Morton-order sort.
  function automatic cluster_t ref_prim(int idx, int spread);
    cluster_t c;
    int unsigned base, sz;
    c.id = ID_W'(idx);
    base = (idx * 37) % 28000;
    // corners stay below 24000 and sizes below 8000: no 15-bit overflow
    c.box.lo_x = COORD_W'((base + $urandom_range(spread)) % 24000);
    c.box.lo_y = COORD_W'(($urandom_range(spread) + base / 2) % 24000);
    c.box.lo_z = COORD_W'($urandom_range(spread) % 24000);
    sz = $urandom_range(spread / 4 + 1) % 8000;
    c.box.hi_x = c.box.lo_x + COORD_W'($urandom_range(sz));
    c.box.hi_y = c.box.lo_y + COORD_W'($urandom_range(sz));
    c.box.hi_z = c.box.lo_z + COORD_W'($urandom_range(sz));
    return c;
  endfunction
endpackage
