// merge_unit: joins two mutually nearest clusters.
//
// The parent box is the union of the two child boxes and takes the new node
// identifier supplied by the sweep unit. The same data is also presented as a
// BVH node record {id, left child, right child, box}; the left child is the
// cluster with the lower index in the sequence. Purely combinational; the
// sweep unit registers both outputs.
module merge_unit
  import ploc_pkg::*;
(
  input  cluster_t  lower,
  input  cluster_t  upper,
  input  node_id_t  new_id,
  output cluster_t  merged,
  output bvh_node_t node
);

  always_comb begin
    merged.id  = new_id;
    merged.box = aabb_union(lower.box, upper.box);
    node.id    = new_id;
    node.left  = lower.id;
    node.right = upper.id;
    node.box   = merged.box;
  end

endmodule
