// fifo_section: one sweep unit's section of the FIFO memory.
//
// A circular buffer of DEPTH clusters with one write and one read per clock.
// The storage is read synchronously (an SRAM-style array); a one-entry output
// register makes it first-word-fall-through: dout is valid whenever
// dout_valid is high and is consumed by pop. A word written in cycle t can be
// popped from cycle t+2. count is the total occupancy, output register
// included. Pushing when full or popping when empty is an error and is
// asserted against. DEPTH is this design's choice; the section size is not
// given for the original unit.
module fifo_section
  import ploc_pkg::*;
#(
  parameter int unsigned DEPTH = 32768
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  cluster_t                 din,
  output logic                     full,
  input  logic                     pop,
  output cluster_t                 dout,
  output logic                     dout_valid,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  cluster_t                 mem [DEPTH];
  logic [AW-1:0]            wptr, rptr;
  logic [$clog2(DEPTH+1)-1:0] mem_count;  // words in mem, not in dout
  logic                     load;

  assign load  = (mem_count != 0) && (!dout_valid || pop);
  assign count = mem_count + $bits(count)'(dout_valid);
  assign full  = (count == $bits(count)'(DEPTH));

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= din;
    if (load) dout <= mem[rptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr       <= '0;
      rptr       <= '0;
      mem_count  <= '0;
      dout_valid <= 1'b0;
    end else begin
      if (push) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (load) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      mem_count <= mem_count + $bits(mem_count)'(push) - $bits(mem_count)'(load);
      if (load)     dout_valid <= 1'b1;
      else if (pop) dout_valid <= 1'b0;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> dout_valid);

endmodule
