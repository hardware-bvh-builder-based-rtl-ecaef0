// tb_ploc_scene_build: builds a whole scene-sized BVH with the builder at its
// default size (32 sweep units, R = 16, 32768-entry FIFO sections).
//
// The primitive count defaults to that of the Stanford Bunny (69,451
// triangles, about 2,170 per unit); +PRIMS=<n> selects another count up to
// 32 x 32768. Primitives are synthetic boxes that drift along a line, so
// that neighbouring indices are close in space as after a Morton sort. Every
// node record and the root are compared with the reference two-level build,
// and the number of clocks from start to done is reported against the lower
// bound set by the largest unit's first pass.
module tb_ploc_scene_build;
  import ploc_pkg::*;
  import ploc_ref_pkg::*;

  localparam int NU = 32;
  localparam int R  = 16;
  localparam int WATCHDOG = 4000000;

  logic clk = 0, rst_n = 0, start = 0;
  logic     [NU-1:0] ext_valid, ext_last, ext_ready;
  cluster_t [NU-1:0] ext_cluster;
  // one driver process per unit, each with variables of its own
  logic     drv_valid [NU];
  logic     drv_last  [NU];
  cluster_t drv_data  [NU];
  always_comb
    for (int u = 0; u < NU; u++) begin
      ext_valid[u]   = drv_valid[u];
      ext_last[u]    = drv_last[u];
      ext_cluster[u] = drv_data[u];
    end
  logic     [NU-1:0] node_valid;
  bvh_node_t [NU-1:0] node;
  logic root_valid, done;
  cluster_t root;

  ploc_bvh_builder dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    for (int u = 0; u < NU; u++)
      $display("  unit %0d state %0d final %0d nodes %0d", u, dut.st[u], dut.final_cnt[u], got[u].size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collected output
  bvh_node_t got [NU][$];
  int n_root = 0;
  cluster_t got_root;
  always @(posedge clk) begin
    for (int u = 0; u < NU; u++)
      if (node_valid[u]) got[u].push_back(node[u]);
    if (rst_n && root_valid) begin
      n_root++;
      got_root = root;
    end
  end

  // mechanism counters (unit 0 is probed inside)
  int n_stall = 0, n_fifo_pass = 0, n_merge = 0, n_drop = 0, n_fwd = 0, n_topwait = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_unit[0].u_sweep.in_ready && !dut.g_unit[0].u_sweep.in_valid
        && dut.st[0] != 0 && dut.st[0] != 7) n_stall++;
    if (dut.st[0] == 4 && !dut.s_in_valid[0] && !dut.unit_done[dut.src]) n_topwait++;
    for (int u = 0; u < NU; u++) begin
      if (dut.s_pass_done[u] && (dut.st[u] == 2 || dut.st[u] == 5)) n_fifo_pass++;
      if (node_valid[u]) n_merge++;
    end
    if (dut.g_unit[0].u_sweep.advance && dut.g_unit[0].u_sweep.mutual
        && dut.g_unit[0].u_sweep.ln == dut.g_unit[0].u_sweep.c) n_fwd++;
    if (dut.g_unit[1].u_sweep.advance && dut.g_unit[1].u_sweep.mutual
        && dut.g_unit[1].u_sweep.ln == dut.g_unit[1].u_sweep.c) n_fwd++;
    if (dut.g_unit[0].u_sweep.advance && dut.g_unit[0].u_sweep.avalid[dut.g_unit[0].u_sweep.l]
        && !dut.g_unit[0].u_sweep.emit) n_drop++;
  end

  cluster_t seqs [NU][$];

  task automatic drive(input int u);
    for (int i = 0; i < seqs[u].size(); i++) begin
      while ($urandom_range(4) == 0) begin
        drv_valid[u] <= 1'b0;
        @(posedge clk);
      end
      drv_valid[u]   <= 1'b1;
      drv_data[u] <= seqs[u][i];
      drv_last[u]    <= (i == seqs[u].size() - 1);
      @(posedge clk);
      while (!ext_ready[u]) @(posedge clk);
    end
    drv_valid[u] <= 1'b0;
    drv_last[u]  <= 1'b0;
  endtask

  initial begin
    bvh_node_t exp_n [NU][$];
    cluster_t  cur[$], nxt[$], top[$];
    bvh_node_t nds[$];
    int cnt [NU];
    int total = 0, pid = 0, nodes_total = 0;
    int n_prims = 69451;
    longint t_start, t_done;
    if ($value$plusargs("PRIMS=%d", n_prims)) ;

    // stimulus and reference
    for (int u = 0; u < NU; u++) begin
      int len;
      // unit 0 a little shorter so that the top level has to wait
      len = n_prims / NU + ((u < n_prims % NU) ? 1 : 0)
            + ((u == 0) ? -(n_prims / NU / 8) : (u == 1) ? n_prims / NU / 8 : 0);
      for (int i = 0; i < len; i++) seqs[u].push_back(ref_prim(pid++, 300));
      if (u == 0) begin
        // Two equal small boxes exactly R apart with large boxes between:
        // they are each other's nearest at the edge of the search window.
        for (int i = 1; i < R; i++) begin
          seqs[u][i].box = '{lo_x: 0, lo_y: 0, lo_z: 0, hi_x: 20000, hi_y: 20000, hi_z: 20000};
          seqs[u][i].box.hi_x += COORD_W'(i);
        end
        seqs[u][R].box = seqs[u][0].box;
      end
      total += len;
      cnt[u] = 0;
      cur = seqs[u];
      do begin
        ref_pass(cur, R, u, cnt[u], nxt, nds);
        foreach (nds[k]) exp_n[u].push_back(nds[k]);
        cur = nxt;
      end while (cur.size() > R);
      foreach (cur[k]) top.push_back(cur[k]);
    end
    cur = top;
    while (cur.size() > 1) begin
      ref_pass(cur, R, 0, cnt[0], nxt, nds);
      foreach (nds[k]) exp_n[0].push_back(nds[k]);
      cur = nxt;
    end

    for (int u = 0; u < NU; u++) begin
      drv_valid[u] = 1'b0;
      drv_last[u]  = 1'b0;
      drv_data[u]  = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    t_start = cyc;
    for (int u = 0; u < NU; u++) begin
      automatic int uu = u;
      fork
        drive(uu);
      join_none
    end
    while (!done) @(posedge clk);
    t_done = cyc;
    repeat (2) @(posedge clk);
    $display("build of %0d primitives: %0d clocks (first pass of the largest unit alone: %0d)",
             total, t_done - t_start, seqs[1].size());

    check(n_root == 1, $sformatf("root output %0d times", n_root));
    check(got_root == cur[0], $sformatf("root id %h exp %h", got_root.id, cur[0].id));
    for (int u = 0; u < NU; u++) begin
      check(got[u].size() == exp_n[u].size(),
            $sformatf("unit %0d wrote %0d nodes, exp %0d", u, got[u].size(), exp_n[u].size()));
      for (int k = 0; k < exp_n[u].size() && k < got[u].size(); k++)
        check(got[u][k] == exp_n[u][k], $sformatf("unit %0d node %0d differs", u, k));
      nodes_total += got[u].size();
    end
    check(nodes_total == total - 1, $sformatf("%0d internal nodes for %0d primitives", nodes_total, total));
    for (int u = 0; u < NU; u++)
      check(dut.f_dout_valid[u] == 0, $sformatf("section %0d not empty at the end", u));

    $display("primitives=%0d stalls=%0d fifo_passes=%0d merges=%0d drops=%0d forwards=%0d top_waits=%0d",
             total, n_stall, n_fifo_pass, n_merge, n_drop, n_fwd, n_topwait);
    check(n_stall > 0, "no input stall");
    check(n_fifo_pass > 0, "no pass from the FIFO");
    check(n_merge > 0, "no merge");
    check(n_drop > 0, "no dropped partner");
    check(n_fwd > 0, "no key forwarding");
    check(n_topwait > 0, "no top-level wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
