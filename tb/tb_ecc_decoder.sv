// tb_ecc_decoder: all 128 syndromes. A syndrome equal to the column of input
// path p must flag exactly path p; a weight-1 syndrome is a check bit error;
// zero flags nothing; anything else is uncorrectable.
module tb_ecc_decoder;
  import ecc_ref_pkg::*;
  logic [6:0]  syn;
  logic [63:0] err;
  logic        cerr, unc;
  int checks = 0, failures = 0;
  logic clk = 0;

  ecc_decoder dut (.syndrome_i(syn), .err_path_o(err), .check_err_o(cerr), .uncorrectable_o(unc));

  always #5 clk = ~clk;

  initial begin
    for (int s = 0; s < 128; s++) begin
      logic [63:0] exp_err;
      logic exp_c, exp_u;
      syn = 7'(s);
      #1;
      exp_err = '0;
      for (int p = 0; p < 64; p++) if (ref_col(p) == syn) exp_err[p] = 1'b1;
      exp_c = ($countones(syn) == 1);
      exp_u = (s != 0) && !exp_c && (exp_err == '0);
      checks++;
      if (err !== exp_err || cerr !== exp_c || unc !== exp_u) begin
        failures++;
        $display("FAIL syn=%h err=%h/%h c=%b/%b u=%b/%b", syn, err, exp_err, cerr, exp_c, unc, exp_u);
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
