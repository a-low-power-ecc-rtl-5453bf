// tb_path_selector: the identity route at reset; ranking from correlation
// pulses sent in a random order with random gaps (the first 21 bits must form
// the weight-2 group, the next 35 the weight-3 group, rank done after the
// 56th pulse and no change from later pulses); routing through the learned
// route on request and through the active route after commit; restart.
module tb_path_selector;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  data_t  corr = '0, din = '0, pout;
  logic   restart = 0, commit = 0, use_learned = 0;
  route_t rt, learned;
  logic   done;
  int checks = 0, failures = 0;

  path_selector dut (
    .clk, .rst_n, .corr_i(corr), .restart_i(restart), .commit_i(commit),
    .use_learned_i(use_learned), .data_i(din), .paths_o(pout), .route_o(rt),
    .learned_o(learned), .rank_done_o(done)
  );

  always #5 clk = ~clk;

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Route the current data through the selector and compare with the reference.
  task automatic check_routing(logic [63:0] m2, logic [63:0] m3, string what);
    repeat (20) begin
      din = rand_word();
      #1;
      expect_eq(pout, ref_order(m2, m3, din), what);
    end
  endtask

  task automatic rank_round(output logic [63:0] m2, output logic [63:0] m3);
    int perm [64];
    for (int i = 0; i < 64; i++) perm[i] = i;
    for (int i = 63; i > 0; i--) begin
      int j = int'($urandom_range(i, 0));
      int t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    m2 = '0; m3 = '0;
    for (int k = 0; k < 64; k++) begin
      if (k < 21) m2[perm[k]] = 1'b1;
      else if (k < 56) m3[perm[k]] = 1'b1;
      @(negedge clk);
      expect_eq(64'(done), 64'(k >= 56), "rank_done before pulse");
      corr = 64'd1 << perm[k];
      @(negedge clk);
      corr = '0;
      repeat ($urandom_range(2, 0)) @(negedge clk);
    end
    expect_eq(64'(done), 64'd1, "rank_done after all pulses");
    expect_eq(learned.m2, m2, "weight-2 group");
    expect_eq(learned.m3, m3, "weight-3 group");
  endtask

  initial begin
    logic [63:0] m2a, m3a, m2b, m3b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_routing(64'h0000_0000_001f_ffff, 64'h00ff_ffff_ffe0_0000, "identity route");
    expect_eq(64'(done), 64'd0, "no ranking at reset");

    rank_round(m2a, m3a);
    // Active route unchanged until commit; learned route on request.
    check_routing(64'h0000_0000_001f_ffff, 64'h00ff_ffff_ffe0_0000, "active before commit");
    use_learned = 1;
    check_routing(m2a, m3a, "learned route on request");
    expect_eq(rt.m2, m2a, "route_o follows request");
    use_learned = 0;
    @(negedge clk);
    commit = 1; restart = 1;
    @(negedge clk);
    commit = 0; restart = 0;
    expect_eq(64'(done), 64'd0, "restart clears ranking");
    check_routing(m2a, m3a, "active after commit");

    rank_round(m2b, m3b);
    check_routing(m2a, m3a, "old route kept while ranking");
    @(negedge clk);
    commit = 1; restart = 1;
    @(negedge clk);
    commit = 0; restart = 0;
    check_routing(m2b, m3b, "second route after commit");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
