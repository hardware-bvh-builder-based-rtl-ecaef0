// tb_cmp_tree: checks the comparator tree against a linear minimum search,
// for the 16-input tree of the default search radius and for a 5-input tree
// (padded inputs), with random keys and with many equal distances so that
// the offset field must decide.
module tb_cmp_tree;
  localparam int KW = 38;
  logic [15:0][KW-1:0] k16;
  logic [4:0][KW-1:0]  k5;
  logic [KW-1:0] m16, m5;
  int checks = 0, failures = 0;

  cmp_tree #(.N(16), .KEY_W(KW)) dut16 (.keys(k16), .min_key(m16));
  cmp_tree #(.N(5),  .KEY_W(KW)) dut5  (.keys(k5),  .min_key(m5));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [KW-1:0] e16, e5;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < 16; i++) begin
        // few distinct distances in half the trials, so ties are common
        logic [31:0] d = (t % 2) ? 32'($urandom_range(3)) : $urandom;
        k16[i] = {d, 6'($urandom_range(63))};
        if (i < 5) k5[i] = {d, 6'($urandom_range(32))};
      end
      #1;
      e16 = '1; e5 = '1;
      for (int i = 0; i < 16; i++) if (k16[i] < e16) e16 = k16[i];
      for (int i = 0; i < 5; i++)  if (k5[i] < e5) e5 = k5[i];
      checks += 2;
      if (m16 != e16) begin failures++; $display("FAIL 16: %h exp %h", m16, e16); end
      if (m5 != e5)   begin failures++; $display("FAIL 5: %h exp %h", m5, e5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
