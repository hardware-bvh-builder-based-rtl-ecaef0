// tb_fifo_section: checks a 16-entry FIFO section against a queue model
// under random pushes and pops, including filling it to full, draining it to
// empty and simultaneous push and pop. Data order, dout_valid, count and full
// are compared every clock. A word pushed into an empty FIFO must be
// readable two clocks later.
module tb_fifo_section;
  import ploc_pkg::*;

  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, dout_valid;
  cluster_t din = '0, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  cluster_t model[$];
  int n_full = 0;

  fifo_section #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int visible;  // words of the model that can already be read
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // latency: one word into the empty FIFO
    din  <= '{id: 32'h1234, box: '0};
    push <= 1;
    @(posedge clk);
    push <= 0;
    @(posedge clk);
    check(!dout_valid, "word visible after one clock");
    @(posedge clk);
    check(dout_valid && dout.id == 32'h1234, "word not visible after two clocks");
    pop <= 1;
    @(posedge clk);
    pop <= 0;
    @(posedge clk);
    check(!dout_valid && count == 0, "not empty after pop");
    for (int t = 0; t < 4000; t++) begin
      // phases: mostly push, mostly pop, mixed
      int phase = (t / 200) % 3;
      bit do_push, do_pop;
      do_push = !full && ($urandom_range(9) < (phase == 0 ? 8 : phase == 1 ? 2 : 5));
      do_pop  = dout_valid && ($urandom_range(9) < (phase == 0 ? 2 : phase == 1 ? 8 : 5));
      push <= do_push;
      pop  <= do_pop;
      din  <= '{id: $urandom, box: aabb_t'({$urandom, $urandom, $urandom})};
      #1;
      if (do_pop) begin
        check(model.size() > 0 && dout == model[0], "data order");
        void'(model.pop_front());
      end
      if (do_push) model.push_back(din);
      @(posedge clk);
      #1;
      check(count == model.size(), $sformatf("count %0d exp %0d", count, model.size()));
      check(full == (model.size() == DEPTH), "full flag");
      if (full) n_full++;
    end
    push <= 0;
    pop  <= 0;
    check(n_full > 0, "never full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
