// tb_check_bit_generator: checks the H-matrix properties of the 64-bit minimum
// weight column code (column weights per path group, distinct columns, 179
// ones, row weights at most 26) and the check bits of single-bit and random
// inputs against the reference model.
module tb_check_bit_generator;
  import ecc_ref_pkg::*;

  logic [63:0] paths;
  logic [6:0]  check;
  int checks = 0, failures = 0;
  logic clk = 0;

  check_bit_generator dut (.paths_i(paths), .check_o(check));

  always #5 clk = ~clk;

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    int total, rowmax, w;
    int roww [7];
    total = 0; rowmax = 0;
    foreach (roww[r]) roww[r] = 0;
    // Code properties, on the reference table.
    for (int p = 0; p < 64; p++) begin
      w = $countones(ref_col(p));
      total += w;
      for (int r = 0; r < 7; r++) roww[r] += int'(ref_col(p)[r]);
      expect_eq(64'(w), (p < 21) ? 64'd2 : (p < 56) ? 64'd3 : 64'd4, $sformatf("weight of path %0d", p));
      for (int q = 0; q < p; q++) expect_eq(64'(ref_col(p) == ref_col(q)), 64'd0, "distinct columns");
    end
    foreach (roww[r]) if (roww[r] > rowmax) rowmax = roww[r];
    expect_eq(64'(total), 64'd179, "total weight (Table 1)");
    expect_eq(64'(rowmax), 64'd26, "largest row weight M (Table 1)");
    // Every single input path gives its column.
    for (int p = 0; p < 64; p++) begin
      paths = 64'd1 << p;
      #1;
      expect_eq(64'(check), 64'(ref_col(p)), $sformatf("column of path %0d", p));
    end
    paths = '0; #1;
    expect_eq(64'(check), 64'd0, "zero word");
    // Random words.
    repeat (2000) begin
      paths = rand_word();
      #1;
      expect_eq(64'(check), 64'(ref_check(paths)), "random word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
