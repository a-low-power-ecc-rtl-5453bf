// tb_ecc_workload: switching activity of the check bit generator before and
// after on-line reordering, on a synthetic write stream.
//
// Every data bit toggles with its own probability, 0.5 * 0.92**rank, where
// the ranks are a random permutation of the bits, so busy and quiet bits are
// spread over the word as in real data. The measure is the number of input
// transitions of the XOR trees: a toggle on input path p reaches as many
// trees as its column has ones, so each write adds sum(toggle(p) * weight(p)).
// It is measured over WINDOW writes under the reset (identity) route, the
// stream then runs until the unit has ranked the bits and switched routes,
// and it is measured again over WINDOW writes. The test checks that the
// switch happened, that the activity fell, and that the new route puts the 21
// most active bits on weight-2 paths (up to bits of nearly equal rate).
// Correlation count at its default, 256 transitions; the memory is reduced to
// 2**8 words to keep the update short.
module tb_ecc_workload;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int ADDR_W = 8;
  localparam int WINDOW = 4000;

  logic              clk = 0, rst_n = 0;
  logic              req_valid = 0, req_ready, req_write = 1;
  logic [ADDR_W-1:0] req_addr = '0;
  data_t             req_wdata = '0;
  logic              rsp_valid, rsp_corrected, rsp_check_err, rsp_unc;
  data_t             rsp_rdata;
  logic [ADDR_W-1:0] mem_addr;
  logic              mem_re, mem_dwe, mem_cwe;
  data_t             mem_wdata, mem_rdata;
  check_t            mem_wcheck, mem_rcheck;
  logic              busy;
  route_t            active_route, learned_route;

  ecc_top #(.ADDR_W(ADDR_W)) dut (
    .clk, .rst_n,
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_write_i(req_write),
    .req_addr_i(req_addr), .req_wdata_i(req_wdata),
    .rsp_valid_o(rsp_valid), .rsp_rdata_o(rsp_rdata), .rsp_corrected_o(rsp_corrected),
    .rsp_check_err_o(rsp_check_err), .rsp_uncorrectable_o(rsp_unc),
    .mem_addr_o(mem_addr), .mem_re_o(mem_re), .mem_data_we_o(mem_dwe),
    .mem_check_we_o(mem_cwe), .mem_wdata_o(mem_wdata), .mem_wcheck_o(mem_wcheck),
    .mem_rdata_i(mem_rdata), .mem_rcheck_i(mem_rcheck),
    .reorder_busy_o(busy), .active_route_o(active_route), .learned_route_o(learned_route)
  );

  dram_core_model #(.ADDR_W(ADDR_W)) mem (
    .clk, .addr(mem_addr), .re(mem_re), .dwe(mem_dwe), .cwe(mem_cwe),
    .wdata(mem_wdata), .wcheck(mem_wcheck), .rdata(mem_rdata), .rcheck(mem_rcheck)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned thresh [64];   // toggle probability * 2**16
  int rank_of [64];
  word_t cur = '0;

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic word_t next_word(word_t w);
    for (int i = 0; i < 64; i++)
      if ($urandom_range(65535, 0) < thresh[i]) w[i] = ~w[i];
    return w;
  endfunction

  // Write n words back to back; return the weighted input toggles.
  task automatic stream(int n, output longint activity, input bit stop_on_switch);
    word_t prev_paths;
    activity = 0;
    prev_paths = dut.paths;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      cur = next_word(cur);
      req_valid = 1; req_write = 1; req_wdata = cur; req_addr = ADDR_W'(k);
      while (!req_ready) @(negedge clk);
      // input paths of this write, as routed now
      begin
        word_t t;
        t = dut.paths ^ prev_paths;
        for (int p = 0; p < 64; p++) if (t[p]) activity += $countones(ref_col(p));
        prev_paths = dut.paths;
      end
      if (stop_on_switch && busy) break;
    end
    @(negedge clk);
    req_valid = 0;
  endtask

  initial begin
    longint act_before, act_after, dummy;
    int perm [64];
    int misplaced;
    for (int i = 0; i < 64; i++) perm[i] = i;
    for (int i = 63; i > 0; i--) begin
      automatic int j = int'($urandom_range(i, 0));
      automatic int t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    for (int i = 0; i < 64; i++) begin
      rank_of[i] = perm[i];
      thresh[i] = int'(32768.0 * (0.92 ** real'(perm[i])));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    stream(WINDOW, act_before, 0);
    stream(200000, dummy, 1);
    wait (!busy);
    expect_true(active_route.m2 != 64'h0000_0000_001f_ffff, "route switched");
    stream(WINDOW, act_after, 0);
    misplaced = 0;
    for (int i = 0; i < 64; i++)
      if (active_route.m2[i] && rank_of[i] >= 24) misplaced++;
    $display("XOR tree input transitions over %0d writes: %0d before, %0d after reordering (%0.1f%% less)",
             WINDOW, act_before, act_after, 100.0 * real'(act_before - act_after) / real'(act_before));
    expect_true(act_after < act_before, "switching activity reduced");
    expect_true(misplaced == 0, "weight-2 paths hold the busiest bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
