// tb_ploc_sweep_unit: self-checking test of one PLOC sweep pipeline.
//
// Feeds a sequence of primitive boxes as one pass, collects the emitted
// clusters and BVH nodes and compares them, in order, with the reference
// sweep of ploc_ref_pkg. The output of each pass is fed back as the next pass
// until at most R clusters remain, as the builder does. The first pass is fed
// without gaps and must take exactly n + 2R + 1 clocks (one cluster per
// clock); later passes insert random input gaps to exercise stalls.
module tb_ploc_sweep_unit;
  import ploc_pkg::*;
  import ploc_ref_pkg::*;

  localparam int R = 16;
  localparam int N_PRIM = 120;

  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, in_last = 0, in_ready;
  cluster_t in_cluster = '0;
  logic out_valid, node_valid, pass_done;
  cluster_t out_cluster;
  bvh_node_t node;
  logic [31:0] pass_count;

  int checks = 0, failures = 0;
  int cycles = 0;

  ploc_sweep_unit #(.R(R), .B(64), .UNIT_ID(3)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  cluster_t  got_c[$];
  bvh_node_t got_n[$];
  always @(posedge clk) begin
    if (out_valid)  got_c.push_back(out_cluster);
    if (node_valid) got_n.push_back(node);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cluster_t  seq[$], exp_c[$];
    bvh_node_t exp_n[$];
    int cnt = 0, pass = 0, t0, stalls = 0;
    bit gaps;
    for (int i = 0; i < N_PRIM; i++) seq.push_back(ref_prim(i, 400));
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    while (1) begin
      gaps = (pass > 0);
      ref_pass(seq, R, 3, cnt, exp_c, exp_n);
      got_c = {};
      got_n = {};
      t0 = cycles;
      for (int i = 0; i < seq.size(); i++) begin
        while (gaps && ($urandom_range(3) == 0)) begin
          in_valid <= 0;
          stalls++;
          @(posedge clk);
        end
        in_valid   <= 1;
        in_cluster <= seq[i];
        in_last    <= (i == seq.size() - 1);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      in_valid <= 0;
      in_last  <= 0;
      while (!pass_done) @(posedge clk);
      if (!gaps)
        check(cycles - t0 == seq.size() + 2 * R + 1,
              $sformatf("pass %0d took %0d clocks for %0d clusters", pass, cycles - t0, seq.size()));
      check(pass_count == exp_c.size(), $sformatf("pass %0d count %0d exp %0d", pass, pass_count, exp_c.size()));
      @(posedge clk);
      check(got_c.size() == exp_c.size(), $sformatf("pass %0d out size %0d exp %0d", pass, got_c.size(), exp_c.size()));
      check(got_n.size() == exp_n.size(), $sformatf("pass %0d node count %0d exp %0d", pass, got_n.size(), exp_n.size()));
      for (int i = 0; i < exp_c.size() && i < got_c.size(); i++)
        check(got_c[i] == exp_c[i], $sformatf("pass %0d cluster %0d: got id %h exp id %h", pass, i, got_c[i].id, exp_c[i].id));
      for (int i = 0; i < exp_n.size() && i < got_n.size(); i++)
        check(got_n[i] == exp_n[i], $sformatf("pass %0d node %0d: got %h/%h exp %h/%h", pass, i,
              got_n[i].left, got_n[i].right, exp_n[i].left, exp_n[i].right));
      @(posedge clk);
      seq = exp_c;
      pass++;
      if (seq.size() <= R) break;
    end
    check(pass >= 2, "expected several passes");
    check(stalls > 0, "no stall exercised");
    $display("passes=%0d stalls=%0d final clusters=%0d", pass, stalls, seq.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
