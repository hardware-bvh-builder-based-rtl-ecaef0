// tb_merge_unit: checks that the merge unit forms the union box, gives the
// parent the new id and writes a node record with the lower-index cluster as
// left child, on random cluster pairs.
module tb_merge_unit;
  import ploc_pkg::*;
  import ploc_ref_pkg::*;

  cluster_t  lower, upper, merged;
  node_id_t  new_id;
  bvh_node_t node;
  int checks = 0, failures = 0;

  merge_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      lower  = ref_prim(t, 30000);
      upper  = ref_prim(t + 1, 30000);
      new_id = {1'b1, 31'($urandom)};
      #1;
      checks += 5;
      if (merged.id != new_id || node.id != new_id) begin failures++; $display("FAIL id"); end
      if (node.left != lower.id)  begin failures++; $display("FAIL left"); end
      if (node.right != upper.id) begin failures++; $display("FAIL right"); end
      if (merged.box != node.box) begin failures++; $display("FAIL node box"); end
      // the union must contain both boxes and touch each face
      if (!(merged.box.lo_x == ((lower.box.lo_x < upper.box.lo_x) ? lower.box.lo_x : upper.box.lo_x)
         && merged.box.lo_y == ((lower.box.lo_y < upper.box.lo_y) ? lower.box.lo_y : upper.box.lo_y)
         && merged.box.lo_z == ((lower.box.lo_z < upper.box.lo_z) ? lower.box.lo_z : upper.box.lo_z)
         && merged.box.hi_x == ((lower.box.hi_x > upper.box.hi_x) ? lower.box.hi_x : upper.box.hi_x)
         && merged.box.hi_y == ((lower.box.hi_y > upper.box.hi_y) ? lower.box.hi_y : upper.box.hi_y)
         && merged.box.hi_z == ((lower.box.hi_z > upper.box.hi_z) ? lower.box.hi_z : upper.box.hi_z)))
      begin failures++; $display("FAIL union"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
