// cmp_tree: comparator tree returning the smallest of N search keys.
//
// A key is a packed {distance, biased offset} word, so one unsigned compare
// orders by distance and breaks ties towards the lower neighbour index. The
// inputs are padded with all-ones keys to the next power of two and reduced
// pairwise, level by level: 16 inputs give 8 + 4 + 2 + 1 comparators, which is
// the tree drawn for a search radius of 16. Purely combinational.
module cmp_tree #(
  parameter int unsigned N     = 16,
  parameter int unsigned KEY_W = 38
) (
  input  logic [N-1:0][KEY_W-1:0] keys,
  output logic [KEY_W-1:0]        min_key
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned LEAVES = 1 << LEVELS;

  // node[0 .. LEAVES-1] are the leaves; each level halves the count.
  logic [KEY_W-1:0] node [2*LEAVES-1];

  always_comb begin
    int unsigned base_in, base_out, width;
    for (int unsigned i = 0; i < LEAVES; i++)
      node[i] = (i < N) ? keys[i] : '1;
    base_in = 0;
    width   = LEAVES;
    for (int unsigned lv = 0; lv < LEVELS; lv++) begin
      base_out = base_in + width;
      for (int unsigned i = 0; i < LEAVES / 2; i++)
        if (i < width / 2)
          node[base_out+i] = (node[base_in+2*i] <= node[base_in+2*i+1])
                             ? node[base_in+2*i] : node[base_in+2*i+1];
      base_in = base_out;
      width   = width / 2;
    end
    min_key = node[2*LEAVES-2];
  end

endmodule
