// ploc_sweep_unit: one streaming PLOC SWEEP pipeline.
//
// The unit performs a whole PLOC sweep (nearest-neighbour search, merging of
// mutually nearest clusters and compaction) on a stream of clusters, taking
// one cluster per clock. It keeps the clusters around the current position in
// two circular buffers of B entries (B a power of two, so the index wrap is a
// mask): the AABB buffer and the nearest-neighbour buffer, which holds for
// each slot the best {distance, offset} key found so far.
//
// In each advancing clock, with p the slot being written:
//   * the incoming cluster is written to slot p;
//   * c = p - R is the search position: R distance metric evaluators compute
//     distance(C_c, C_c+r) for r = 1..R. Each result, tagged with offset -r,
//     is folded into the key of C_c+r, and, tagged with +r, enters a
//     comparator tree whose minimum is folded into the key of C_c. Each
//     distance is thus computed once and serves both clusters;
//   * l = p - 2R is the merge position: its key is final, and so is that of
//     any neighbour above it. If C_l and its nearest neighbour agree and C_l is
//     the lower of the two, the merge unit joins them, the result leaves at
//     position l and the partner is flagged as merged. Otherwise C_l leaves
//     unchanged, unless it was flagged as merged, in which case nothing leaves.
// Key ties go to the lower neighbour index (offsets are stored biased by +R).
//
// Interface: in_valid/in_ready/in_last carry one pass's sequence. A pass ends
// after in_last: the unit then pushes 2R empty slots to flush the window, and
// in the next clock holds pass_done high for one clock, with pass_count the
// number of clusters it emitted in the pass. out_valid/out_cluster and node_valid/node are registered, at most
// one each per clock, with no back-pressure. While in_valid is low in a pass
// the unit stalls. A pass of n clusters without stalls takes n + 2R + 1
// clocks. clear (synchronous) empties the buffers and restarts the numbering
// of internal nodes.
//
// The pipeline follows the sweep algorithm and the unit structure of the
// document (DMEs, comparator tree, merge unit, AABB and nearest-neighbour
// buffers). The single-clock evaluation, the buffer size B, the flush, the
// pass handshake and the node numbering are this design's choices.
module ploc_sweep_unit
  import ploc_pkg::*;
#(
  parameter int unsigned R       = 16,
  parameter int unsigned B       = 64,
  parameter int unsigned UNIT_ID = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        in_last,
  input  cluster_t    in_cluster,
  output logic        out_valid,
  output cluster_t    out_cluster,
  output logic        node_valid,
  output bvh_node_t   node,
  output logic        pass_done,
  output logic [31:0] pass_count
);

  localparam int unsigned PW    = $clog2(B);
  localparam int unsigned OFF_W = $clog2(2 * R + 1);
  localparam int unsigned KEY_W = DIST_W + OFF_W;

  typedef struct packed {
    dist_t            distance;
    logic [OFF_W-1:0] off;   // neighbour offset + R
  } key_t;

  typedef logic [PW-1:0] slot_t;

  typedef enum logic [1:0] {S_RUN, S_FLUSH, S_DONE} state_t;

  // ---------------------------------------------------------------- buffers
  cluster_t abuf   [B];   // AABB buffer
  logic     avalid [B];   // slot holds a cluster of the current pass
  key_t     nbuf   [B];   // nearest-neighbour buffer
  logic     merged [B];   // merged into a lower cluster already

  state_t            state;
  slot_t             p;
  logic [$clog2(2*R+1)-1:0] flush_cnt;
  logic [CNT_W-1:0]  node_cnt;

  logic     advance, push_v;
  cluster_t push_c;

  assign in_ready = (state == S_RUN);
  assign advance  = (state == S_RUN && in_valid) || (state == S_FLUSH);
  assign push_v   = (state == S_RUN);
  assign push_c   = in_cluster;
  assign pass_done = (state == S_DONE);

  // ------------------------------------------------------ search window
  slot_t           c;
  cluster_t        win_c [R+1];
  logic            win_v [R+1];
  dist_t           d     [R+1];
  logic [R-1:0][KEY_W-1:0] my_keys;
  logic [KEY_W-1:0]        best_raw;
  key_t            best, nn_c_new;
  key_t            other_key [R+1];

  assign c = p - slot_t'(R);

  always_comb begin
    for (int unsigned r = 0; r <= R; r++) begin
      win_c[r] = (r == R) ? push_c : abuf[slot_t'(c + slot_t'(r))];
      win_v[r] = (r == R) ? push_v : avalid[slot_t'(c + slot_t'(r))];
    end
  end

  assign d[0] = DIST_MAX;
  for (genvar r = 1; r <= R; r++) begin : g_dme
    dme u_dme (
      .a       (win_c[0].box),
      .a_valid (win_v[0]),
      .b       (win_c[r].box),
      .b_valid (win_v[r]),
      .distance    (d[r])
    );
    assign my_keys[r-1]  = {d[r], OFF_W'(R + r)};
    assign other_key[r]  = '{distance: d[r], off: OFF_W'(R - r)};
  end
  assign other_key[0] = '{distance: DIST_MAX, off: '1};

  cmp_tree #(.N(R), .KEY_W(KEY_W)) u_cmp (
    .keys    (my_keys),
    .min_key (best_raw)
  );

  assign best     = key_t'(best_raw);
  assign nn_c_new = (best < nbuf[c]) ? best : nbuf[c];

  // ------------------------------------------------------ merge decision
  slot_t     l, ln;
  key_t      key_l, key_ln;
  logic      up, mutual, emit;
  cluster_t  merged_c;
  bvh_node_t merged_n;
  node_id_t  new_id;

  assign l      = p - slot_t'(2 * R);
  assign key_l  = nbuf[l];
  // The neighbour lies above l when the stored offset exceeds the bias.
  assign up     = (key_l.distance != DIST_MAX) && (key_l.off > OFF_W'(R));
  assign ln     = l + slot_t'(key_l.off - OFF_W'(R));
  assign key_ln = (ln == c) ? nn_c_new : nbuf[ln];
  assign mutual = avalid[l] && up && (key_ln.distance != DIST_MAX)
                  && (ln + slot_t'(key_ln.off) == l + slot_t'(R));
  assign emit   = avalid[l] && (mutual || !merged[l]);
  assign new_id = {1'b1, UNIT_W'(UNIT_ID), node_cnt};

  merge_unit u_merge (
    .lower  (abuf[l]),
    .upper  (abuf[ln]),
    .new_id (new_id),
    .merged (merged_c),
    .node   (merged_n)
  );

  // ------------------------------------------------------ state update
  always_ff @(posedge clk) begin
    if (advance) begin
      for (int unsigned r = 1; r < R; r++)
        if (other_key[r] < nbuf[slot_t'(c + slot_t'(r))])
          nbuf[slot_t'(c + slot_t'(r))] <= other_key[r];
      nbuf[c]    <= nn_c_new;
      nbuf[p]    <= other_key[R];
      abuf[p]    <= push_c;
      if (mutual) merged[ln] <= 1'b1;
      merged[p]  <= 1'b0;
      out_cluster <= mutual ? merged_c : abuf[l];
      node        <= merged_n;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_RUN;
      p          <= '0;
      flush_cnt  <= '0;
      node_cnt   <= '0;
      pass_count <= '0;
      out_valid  <= 1'b0;
      node_valid <= 1'b0;
      for (int unsigned i = 0; i < B; i++) avalid[i] <= 1'b0;
    end else if (clear) begin
      state      <= S_RUN;
      flush_cnt  <= '0;
      node_cnt   <= '0;
      pass_count <= '0;
      out_valid  <= 1'b0;
      node_valid <= 1'b0;
      for (int unsigned i = 0; i < B; i++) avalid[i] <= 1'b0;
    end else begin
      out_valid  <= advance && emit;
      node_valid <= advance && mutual;
      if (advance) begin
        p         <= p + 1'b1;
        avalid[p] <= push_v;
        if (mutual) node_cnt <= node_cnt + 1'b1;
        if (emit)   pass_count <= pass_count + 1;
      end
      case (state)
        S_RUN:
          if (in_valid && in_last) begin
            state     <= S_FLUSH;
            flush_cnt <= ($bits(flush_cnt))'(2 * R);
          end
        S_FLUSH: begin
          flush_cnt <= flush_cnt - 1'b1;
          if (flush_cnt == 1) state <= S_DONE;
        end
        default: begin  // S_DONE: pass_count is final; start afresh
          pass_count <= '0;
          state      <= S_RUN;
        end
      endcase
    end
  end

  a_window_fits: assert property (@(posedge clk) B >= 2 * R + 1);
  a_last_with_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                      in_last |-> in_valid || state != S_RUN);

endmodule
