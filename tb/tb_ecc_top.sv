// tb_ecc_top: end-to-end test of the ECC unit with its memory cores modelled.
//
// Each round writes a data stream in which a random set A of 21 bits toggles
// on every write, a set B of 35 bits every second write and the other 8 never
// after the first write. The unit must rank A onto the weight-2 input paths
// and B onto the weight-3 paths, stall the host, rewrite every stored check
// word under the new route (fixing an error injected into memory on the
// way), and make the route active. The testbench checks the stored check
// bits after every write and after each update against a reference encoder,
// reads every written word back, and injects single data bit errors, single
// check bit errors and double errors that match no column.
// It counts each mechanism and fails if one never happened: staggered
// correlation signals (several bits reaching their count together), ranking
// done, host stalled by the update and by a read, update with data
// correction, route switch, read correction, check bit error, uncorrectable.
module tb_ecc_top;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int ADDR_W = 6;
  localparam int CNT_W  = 3;
  localparam int ROUNDS = 2;
  localparam int WATCHDOG = 200000;
  localparam longint WORDS = longint'(1) << ADDR_W;

  logic              clk = 0, rst_n = 0;
  logic              req_valid = 0, req_ready, req_write = 0;
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

  ecc_top #(.ADDR_W(ADDR_W), .CNT_W(CNT_W)) dut (
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
  word_t golden [longint];
  word_t exp_m2 = 64'h0000_0000_001f_ffff, exp_m3 = 64'h00ff_ffff_ffe0_0000;
  word_t next_m2 = '0, next_m3 = '0;  // route the current round should learn

  // Mechanism counters.
  int n_tie = 0, n_rank = 0, n_stall_upd = 0, n_stall_rd = 0, n_update = 0;
  int n_upd_fix = 0, n_switch = 0, n_corr = 0, n_cerr = 0, n_unc = 0;
  int busy_len = 0, last_busy_len = 0;
  logic busy_d = 0, rank_d = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if ($countones(dut.u_detector.waiting) > 1) n_tie++;
      if (dut.rank_done && !rank_d) n_rank++;
      rank_d <= dut.rank_done;
      if (req_valid && !req_ready && busy) n_stall_upd++;
      if (req_valid && !req_ready && rsp_valid) n_stall_rd++;
      if (busy && mem_dwe) n_upd_fix++;
      if (busy) busy_len++;
      if (busy_d && !busy) begin
        n_update++;
        last_busy_len = busy_len;
        busy_len = 0;
      end
      busy_d <= busy;
    end
  end

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  task automatic host_write(longint a, word_t d);
    bit held = 0;
    @(negedge clk);
    req_valid = 1; req_write = 1; req_addr = ADDR_W'(a); req_wdata = d;
    while (!req_ready) begin
      if (busy) held = 1;
      @(negedge clk);
    end
    // a write held up by an update is encoded under the new route
    if (held) begin
      exp_m2 = next_m2; exp_m3 = next_m3;
    end
    @(negedge clk);
    req_valid = 0;
    golden[a] = d;
    expect_eq(64'(mem.check[ADDR_W'(a)]), 64'(ref_encode(exp_m2, exp_m3, d)), "check bits written");
  endtask

  task automatic host_read(longint a, output word_t d, output logic [2:0] flags);
    int lat = 0;
    @(negedge clk);
    req_valid = 1; req_write = 0; req_addr = ADDR_W'(a);
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    expect_eq(64'(rsp_valid), 64'd1, "read answered in the next cycle");
    d = rsp_rdata;
    flags = {rsp_corrected, rsp_check_err, rsp_unc};
  endtask

  // Two reads back to back: the second waits while the first is answered.
  task automatic host_read_pair(longint a1, longint a2, output word_t d1, output word_t d2);
    @(negedge clk);
    req_valid = 1; req_write = 0; req_addr = ADDR_W'(a1);
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    expect_eq(64'(rsp_valid), 64'd1, "first read answered");
    expect_eq(64'(req_ready), 64'd0, "not ready in a read's answer cycle");
    d1 = rsp_rdata;
    req_addr = ADDR_W'(a2);
    @(negedge clk);
    expect_eq(64'(req_ready), 64'd1, "ready after the answer cycle");
    @(negedge clk);
    req_valid = 0;
    expect_eq(64'(rsp_valid), 64'd1, "second read answered");
    d2 = rsp_rdata;
  endtask

  function automatic word_t stored(longint a);
    return golden.exists(a) ? golden[a] : '0;
  endfunction

  // Check that every word in memory holds its check bits under the route.
  task automatic check_memory(int samples);
    for (int s = 0; s < samples; s++) begin
      longint a;
      a = (longint'(samples) >= WORDS) ? longint'(s) : longint'({$urandom(), $urandom()} % WORDS);
      expect_eq(mem.data[ADDR_W'(a)], stored(a), "memory data after update");
      expect_eq(64'(mem.check[ADDR_W'(a)]), 64'(ref_encode(exp_m2, exp_m3, mem.data[ADDR_W'(a)])), "memory check bits after update");
    end
    foreach (golden[a]) begin
      expect_eq(mem.data[ADDR_W'(a)], golden[a], "written word after update");
      expect_eq(64'(mem.check[ADDR_W'(a)]), 64'(ref_encode(exp_m2, exp_m3, golden[a])), "written check bits after update");
    end
  endtask

  task automatic round_run(int r, int samples);
    word_t a_m, b_m, base, d;
    longint k, addr, bad_addr;
    int bad_bit;
    int updates_before;
    ref_rand_route(a_m, b_m);
    next_m2 = a_m; next_m3 = b_m;
    base = rand_word();
    updates_before = n_update;
    k = 0;
    bad_addr = -1;
    // Write until the ranking is done and the update has run.
    while (n_update == updates_before) begin
      d = base ^ (k[0] ? a_m : '0) ^ (k[1] ? b_m : '0);
      addr = (k * 37 + r * 11) % WORDS;
      host_write(addr, d);
      if (k == 3) begin
        // a soft error in the memory core, fixed by the update
        bad_addr = addr;
        bad_bit = int'($urandom_range(63, 0));
        mem.data[ADDR_W'(addr)][bad_bit] = ~mem.data[ADDR_W'(addr)][bad_bit];
      end
      repeat (3) @(negedge clk);
      k++;
      if (k > 100000) break;
    end
    expect_eq(64'(n_update), 64'(updates_before + 1), "one update per round");
    expect_eq(64'(last_busy_len), 64'(3 * WORDS + 1), "update takes 3 cycles per word + 1");
    expect_eq(active_route.m2, a_m, "busiest 21 bits on weight-2 paths");
    expect_eq(active_route.m3, b_m, "next 35 bits on weight-3 paths");
    if (active_route.m2 == a_m && active_route.m3 == b_m) n_switch++;
    exp_m2 = a_m; exp_m3 = b_m;
    // the pending write that stalled during the update went in afterwards
    check_memory(samples);
    if (bad_addr >= 0) expect_eq(mem.data[ADDR_W'(bad_addr)], golden[bad_addr], "update fixed memory error");
  endtask

  task automatic read_checks(int n);
    word_t d;
    logic [2:0] fl;
    longint addrs [$];
    foreach (golden[a]) addrs.push_back(a);
    for (int i = 0; i < n; i++) begin
      longint a;
      int kind;
      a = addrs[$urandom_range(addrs.size() - 1, 0)];
      kind = i % 4;
      if (kind == 0) begin
        longint a2;
        word_t d2;
        host_read(a, d, fl);
        expect_eq(d, golden[a], "clean read");
        expect_eq(64'(fl), 64'b000, "clean read flags");
        a2 = addrs[$urandom_range(addrs.size() - 1, 0)];
        host_read_pair(a, a2, d, d2);
        expect_eq(d, golden[a], "first of two reads");
        expect_eq(d2, golden[a2], "second of two reads");
      end else if (kind == 1) begin
        int b;
        b = int'($urandom_range(63, 0));
        mem.data[ADDR_W'(a)][b] = ~mem.data[ADDR_W'(a)][b];
        host_read(a, d, fl);
        mem.data[ADDR_W'(a)][b] = ~mem.data[ADDR_W'(a)][b];
        expect_eq(d, golden[a], "single data error corrected");
        expect_eq(64'(fl), 64'b100, "single data error flags");
        if (fl == 3'b100 && d == golden[a]) n_corr++;
      end else if (kind == 2) begin
        int b;
        b = int'($urandom_range(6, 0));
        mem.check[ADDR_W'(a)][b] = ~mem.check[ADDR_W'(a)][b];
        host_read(a, d, fl);
        mem.check[ADDR_W'(a)][b] = ~mem.check[ADDR_W'(a)][b];
        expect_eq(d, golden[a], "check bit error leaves data");
        expect_eq(64'(fl), 64'b010, "check bit error flag");
        if (fl == 3'b010) n_cerr++;
      end else begin
        // two data bits whose columns add up to no column and no unit vector
        int dest [64];
        int b1, b2;
        chk_t s;
        ref_map(exp_m2, exp_m3, dest);
        do begin
          b1 = int'($urandom_range(63, 0));
          b2 = int'($urandom_range(63, 0));
          s = ref_col(dest[b1]) ^ ref_col(dest[b2]);
        end while (b1 == b2 || $countones(s) < 2 || is_col(s));
        mem.data[ADDR_W'(a)][b1] = ~mem.data[ADDR_W'(a)][b1];
        mem.data[ADDR_W'(a)][b2] = ~mem.data[ADDR_W'(a)][b2];
        host_read(a, d, fl);
        mem.data[ADDR_W'(a)][b1] = ~mem.data[ADDR_W'(a)][b1];
        mem.data[ADDR_W'(a)][b2] = ~mem.data[ADDR_W'(a)][b2];
        expect_eq(64'(fl), 64'b001, "double error flagged uncorrectable");
        if (fl == 3'b001) n_unc++;
      end
    end
  endtask

  function automatic bit is_col(chk_t s);
    for (int p = 0; p < 64; p++) if (ref_col(p) == s) return 1'b1;
    return 1'b0;
  endfunction

  task automatic need(int n, string what);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    expect_eq(active_route.m2, exp_m2, "identity route at reset");
    for (int r = 0; r < ROUNDS; r++) begin
      round_run(r, (WORDS <= 4096) ? int'(WORDS) : 2000);
      read_checks(40);
    end
    need(n_tie, "staggered correlation signals");
    need(n_rank, "ranking done");
    need(n_stall_upd, "host stalled by update");
    need(n_stall_rd, "host stalled by read");
    need(n_update, "check bit update");
    need(n_upd_fix, "update corrected a word");
    need(n_switch, "route switched");
    need(n_corr, "read corrected data bit");
    need(n_cerr, "check bit error");
    need(n_unc, "uncorrectable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
