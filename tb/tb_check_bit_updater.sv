// tb_check_bit_updater: runs two updates over an 8-word memory. The testbench
// plays the read datapath: the cycle after a read it returns the word, with
// one bit flipped for some addresses as if the corrector had fixed it. Every
// cycle's control outputs are compared with the expected sequence
// read / capture / write-back per address, then commit; the written word
// must be the captured one; the update must take 3 cycles per word + 1.
module tb_check_bit_updater;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int ADDR_W = 3;
  localparam int WORDS  = 1 << ADDR_W;

  logic              clk = 0, rst_n = 0, start = 0;
  logic              busy, re, dwe, cwe, use_l, sel_wb, commit;
  logic [ADDR_W-1:0] addr;
  data_t             cdata = '0, wb;
  logic              corrected = 0;
  int checks = 0, failures = 0;

  check_bit_updater #(.ADDR_W(ADDR_W)) dut (
    .clk, .rst_n, .start_i(start), .busy_o(busy),
    .mem_addr_o(addr), .mem_re_o(re), .mem_data_we_o(dwe), .mem_check_we_o(cwe),
    .use_learned_o(use_l), .sel_wb_o(sel_wb),
    .corr_data_i(cdata), .corrected_i(corrected), .wb_data_o(wb), .commit_o(commit)
  );

  always #5 clk = ~clk;

  data_t mem [WORDS];

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  // One control vector {busy, re, dwe, cwe, use_l, sel_wb, commit}.
  function automatic logic [6:0] ctl();
    return {busy, re, dwe, cwe, use_l, sel_wb, commit};
  endfunction

  task automatic run_update(int round);
    int cycles = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int a = 0; a < WORDS; a++) begin
      logic fix;
      data_t fixed;
      fix = ((a + round) % 3 == 0);
      // RD
      expect_eq(64'(ctl()), 64'b1100000, "read cycle");
      expect_eq(64'(addr), 64'(a), "read address");
      @(negedge clk); cycles++;
      // CAP: the datapath returns the corrected word
      expect_eq(64'(ctl()), 64'b1000000, "capture cycle");
      fixed = mem[a] ^ (fix ? (word_t'(1) << (a * 7 + round)) : '0);
      cdata = fixed; corrected = fix;
      @(negedge clk); cycles++;
      cdata = rand_word(); corrected = 1'($urandom_range(1, 0));
      // WR
      expect_eq(64'(ctl()), {57'd0, 1'b1, 1'b0, fix, 1'b1, 1'b1, 1'b1, 1'b0}, "write-back cycle");
      expect_eq(64'(addr), 64'(a), "write-back address");
      expect_eq(wb, fixed, "write-back word");
      @(negedge clk); cycles++;
    end
    expect_eq(64'(ctl()), 64'b1000001, "commit cycle");
    @(negedge clk); cycles++;
    expect_eq(64'(ctl()), 64'b0000000, "idle after commit");
    expect_eq(64'(cycles), 64'(3 * WORDS + 1), "update length in cycles");
    repeat (3) begin
      @(negedge clk);
      expect_eq(64'(ctl()), 64'b0000000, "stays idle");
    end
  endtask

  initial begin
    foreach (mem[a]) mem[a] = rand_word();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq(64'(ctl()), 64'b0000000, "idle after reset");
    run_update(0);
    run_update(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
