// tb_syndrome_generator: the syndrome is the bitwise difference of read and
// stored check bits; checked exhaustively over both 7-bit inputs.
module tb_syndrome_generator;
  logic [6:0] rc, wc, syn;
  int checks = 0, failures = 0;
  logic clk = 0;

  syndrome_generator dut (.read_check_i(rc), .write_check_i(wc), .syndrome_o(syn));

  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < 128; a++)
      for (int b = 0; b < 128; b++) begin
        logic [6:0] exp;
        rc = 7'(a); wc = 7'(b);
        #1;
        exp = '0;
        for (int k = 0; k < 7; k++) exp[k] = (rc[k] != wc[k]);
        checks++;
        if (syn !== exp) begin
          failures++;
          $display("FAIL rc=%h wc=%h syn=%h", rc, wc, syn);
        end
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
