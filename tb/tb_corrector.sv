// tb_corrector: random words with no error or one located error; the data
// bit must be flipped and the corrected flag set only when an error is given.
module tb_corrector;
  import ecc_ref_pkg::*;
  logic [63:0] d, e, q;
  logic        c;
  int checks = 0, failures = 0;
  logic clk = 0;

  corrector dut (.data_i(d), .err_bits_i(e), .data_o(q), .corrected_o(c));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) begin
      int pos;
      logic [63:0] exp;
      d = rand_word();
      pos = int'($urandom_range(64, 0));
      e = (pos == 64) ? '0 : (64'd1 << pos);
      #1;
      exp = d;
      if (pos != 64) exp[pos] = ~exp[pos];
      checks++;
      if (q !== exp || c !== (pos != 64)) begin
        failures++;
        $display("FAIL d=%h pos=%0d q=%h c=%b", d, pos, q, c);
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
