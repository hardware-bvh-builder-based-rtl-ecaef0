// ploc_bvh_builder: PLOC++ two-level BVH builder (control unit and top level).
//
// The builder takes scene primitives already sorted in Morton order and split
// into N_UNITS independent sequences, and builds a binary BVH over them.
// Each sequence is handled by its own ploc_sweep_unit with its own section of
// the FIFO memory:
//   * first pass: the sequence streams in from the external input port of
//     the unit; every cluster the sweep emits is appended to the unit's FIFO
//     section;
//   * further passes: the unit re-reads its section (exactly as many
//     clusters as the last pass emitted) and appends its output behind them,
//     until a pass leaves R or fewer clusters (R = search radius). The unit is
//     then done and its section holds its partial hierarchy's top clusters;
//   * top level: as soon as unit 0 is done it re-reads the concatenation of
//     all sections, in unit order, which keeps the Morton order of the whole
//     scene. It waits (stalls) at a section whose unit has not finished yet.
//     Its output goes to section 0, and it keeps sweeping section 0 until a
//     single cluster, the root, remains. The root is then popped and shown on
//     root/root_valid, and done goes high.
// Every merge anywhere produces one BVH node record on that unit's
// node_valid/node outputs (id, children, box); leaves are the primitive ids
// given with the input. Internal node ids are {1, unit, counter}.
//
// Interface: pulse start (one clock) to begin a build; it clears the sweep
// units. ext_* are per-unit valid/ready streams, each ending with ext_last on
// its final primitive; each sequence must hold at least one primitive and at
// most FIFO_DEPTH. Nodes are written out without back-pressure.
//
// The overall organisation (parallel sweep units fed externally, one FIFO
// section per unit, top level built by the unit holding the lowest indices,
// termination at R clusters, R = 16, 32 units) follows the document. The
// handshakes, the FIFO section size, the node numbering and the root output
// are this design's choices.
module ploc_bvh_builder
  import ploc_pkg::*;
#(
  parameter int unsigned N_UNITS    = 32,
  parameter int unsigned R          = 16,
  parameter int unsigned B          = 64,
  parameter int unsigned FIFO_DEPTH = 32768
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic     [N_UNITS-1:0]  ext_valid,
  output logic     [N_UNITS-1:0]  ext_ready,
  input  logic     [N_UNITS-1:0]  ext_last,
  input  cluster_t [N_UNITS-1:0]  ext_cluster,
  output logic     [N_UNITS-1:0]  node_valid,
  output bvh_node_t [N_UNITS-1:0] node,
  output logic                    root_valid,
  output cluster_t                root,
  output logic                    done
);

  localparam int unsigned UW = (N_UNITS > 1) ? $clog2(N_UNITS) : 1;
  localparam int unsigned FW = $clog2(FIFO_DEPTH + 1);

  typedef enum logic [2:0] {
    U_IDLE,  // waiting for start
    U_EXT,   // first pass, from the external input
    U_LOOP,  // further passes of the unit's own sequence
    U_DONE,  // R or fewer clusters left
    U_TOP,   // unit 0: first top-level pass over all sections
    U_TLOOP, // unit 0: further top-level passes over section 0
    U_ROOT,  // unit 0: pop the root
    U_FIN    // unit 0: build finished
  } ustate_t;

  // per-unit signals
  ustate_t              st        [N_UNITS];
  logic [31:0]          remaining [N_UNITS];
  logic [31:0]          final_cnt [N_UNITS];
  logic [N_UNITS-1:0]   unit_done;

  logic [N_UNITS-1:0]   s_in_valid, s_in_ready, s_in_last, s_out_valid, s_pass_done;
  cluster_t             s_in_cluster  [N_UNITS];
  cluster_t             s_out_cluster [N_UNITS];
  logic [31:0]          s_pass_count  [N_UNITS];

  logic [N_UNITS-1:0]   f_pop, f_full, f_dout_valid;
  cluster_t             f_dout  [N_UNITS];
  logic [FW-1:0]        f_count [N_UNITS];

  // top-level reader of unit 0
  logic [UW-1:0]        src;
  logic [31:0]          src_used;
  logic                 top_fire, top_last_of_src;

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    ploc_sweep_unit #(.R(R), .B(B), .UNIT_ID(u)) u_sweep (
      .clk         (clk),
      .rst_n       (rst_n),
      .clear       (start),
      .in_valid    (s_in_valid[u]),
      .in_ready    (s_in_ready[u]),
      .in_last     (s_in_last[u]),
      .in_cluster  (s_in_cluster[u]),
      .out_valid   (s_out_valid[u]),
      .out_cluster (s_out_cluster[u]),
      .node_valid  (node_valid[u]),
      .node        (node[u]),
      .pass_done   (s_pass_done[u]),
      .pass_count  (s_pass_count[u])
    );

    fifo_section #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk        (clk),
      .rst_n      (rst_n),
      .push       (s_out_valid[u]),
      .din        (s_out_cluster[u]),
      .full       (f_full[u]),
      .pop        (f_pop[u]),
      .dout       (f_dout[u]),
      .dout_valid (f_dout_valid[u]),
      .count      (f_count[u])
    );

    assign unit_done[u] = (st[u] == U_DONE) || (st[u] == U_TOP) || (st[u] == U_TLOOP)
                          || (st[u] == U_ROOT) || (st[u] == U_FIN);
    assign ext_ready[u] = (st[u] == U_EXT) && s_in_ready[u];

    // input selection of the sweep unit
    always_comb begin
      s_in_valid[u]   = 1'b0;
      s_in_last[u]    = 1'b0;
      s_in_cluster[u] = f_dout[u];
      case (st[u])
        U_EXT: begin
          s_in_valid[u]   = ext_valid[u];
          s_in_last[u]    = ext_last[u];
          s_in_cluster[u] = ext_cluster[u];
        end
        U_LOOP, U_TLOOP: begin
          s_in_valid[u] = f_dout_valid[u] && (remaining[u] != 0);
          s_in_last[u]  = (remaining[u] == 1);
        end
        U_TOP: begin
          s_in_valid[u]   = unit_done[src] && f_dout_valid[src] && (src_used < final_cnt[src]);
          s_in_last[u]    = top_last_of_src && (src == UW'(N_UNITS - 1));
          s_in_cluster[u] = f_dout[src];
        end
        default: ;
      endcase
    end

    // pass sequencing
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st[u]        <= U_IDLE;
        remaining[u] <= '0;
        final_cnt[u] <= '0;
      end else if (start) begin
        st[u]        <= U_EXT;
        remaining[u] <= '0;
        final_cnt[u] <= '0;
      end else begin
        if ((st[u] == U_LOOP || st[u] == U_TLOOP) && s_in_valid[u] && s_in_ready[u])
          remaining[u] <= remaining[u] - 1;
        case (st[u])
          U_EXT, U_LOOP:
            if (s_pass_done[u]) begin
              if (s_pass_count[u] <= R) begin
                st[u]        <= U_DONE;
                final_cnt[u] <= s_pass_count[u];
              end else begin
                st[u]        <= U_LOOP;
                remaining[u] <= s_pass_count[u];
              end
            end
          U_DONE:
            if (u == 0) st[u] <= U_TOP;
          U_TOP, U_TLOOP:
            if (s_pass_done[u]) begin
              if (s_pass_count[u] <= 1) begin
                st[u] <= U_ROOT;
              end else begin
                st[u]        <= U_TLOOP;
                remaining[u] <= s_pass_count[u];
              end
            end
          U_ROOT:
            if (f_dout_valid[u]) st[u] <= U_FIN;
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------ section read ports
  assign top_fire        = (st[0] == U_TOP) && s_in_valid[0] && s_in_ready[0];
  assign top_last_of_src = (src_used + 1 == final_cnt[src]);

  always_comb begin
    for (int unsigned u = 0; u < N_UNITS; u++)
      f_pop[u] = ((st[u] == U_LOOP || st[u] == U_TLOOP) && s_in_valid[u] && s_in_ready[u])
                 || (top_fire && src == UW'(u));
    f_pop[0] = f_pop[0] || ((st[0] == U_ROOT) && f_dout_valid[0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src        <= '0;
      src_used   <= '0;
      root_valid <= 1'b0;
      root       <= '0;
      done       <= 1'b0;
    end else if (start) begin
      src        <= '0;
      src_used   <= '0;
      root_valid <= 1'b0;
      done       <= 1'b0;
    end else begin
      root_valid <= 1'b0;
      if (top_fire) begin
        if (top_last_of_src) begin
          src      <= src + 1'b1;
          src_used <= '0;
        end else begin
          src_used <= src_used + 1;
        end
      end
      if (st[0] == U_ROOT && f_dout_valid[0]) begin
        root_valid <= 1'b1;
        root       <= f_dout[0];
        done       <= 1'b1;
      end
    end
  end

  a_no_fifo_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                       (s_out_valid & f_full) == '0);

endmodule
