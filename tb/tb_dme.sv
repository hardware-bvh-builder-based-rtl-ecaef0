// tb_dme: checks the distance metric evaluator against a 64-bit reference
// computation of the half surface area of the union box, on random boxes,
// on extreme boxes, and with either side marked empty.
module tb_dme;
  import ploc_pkg::*;
  import ploc_ref_pkg::*;

  aabb_t a, b;
  logic  av, bv;
  dist_t distance;
  int checks = 0, failures = 0;

  dme dut (.a(a), .a_valid(av), .b(b), .b_valid(bv), .distance(distance));

  task automatic expect_dist(input longint unsigned exp, input string what);
    #1;
    checks++;
    if (64'(distance) != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, distance, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    av = 1; bv = 1;
    for (int i = 0; i < 2000; i++) begin
      a = ref_prim(i, 20000).box;
      b = ref_prim(i + $urandom_range(50), 20000).box;
      expect_dist(ref_area(a, b), "random");
    end
    // largest possible box: 3 * (2^15-1)^2 must still fit
    a = '{lo_x: 0, lo_y: 0, lo_z: 0, hi_x: 0, hi_y: 0, hi_z: 0};
    b = '{lo_x: '1, lo_y: '1, lo_z: '1, hi_x: '1, hi_y: '1, hi_z: '1};
    expect_dist(3 * 64'd32767 * 64'd32767, "full extent");
    // union is not a sum of the two boxes: b inside a
    a = '{lo_x: 10, lo_y: 20, lo_z: 30, hi_x: 110, hi_y: 220, hi_z: 330};
    b = '{lo_x: 50, lo_y: 50, lo_z: 50, hi_x: 60, hi_y: 60, hi_z: 60};
    expect_dist(100 * 200 + 200 * 300 + 300 * 100, "nested");
    av = 0;
    expect_dist(64'hFFFF_FFFF, "a empty");
    av = 1; bv = 0;
    expect_dist(64'hFFFF_FFFF, "b empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
