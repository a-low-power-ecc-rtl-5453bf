// tb_path_deselector: random routes. Each input path alone must come out on
// the data bit the reference places on that path, and random vectors must be
// permuted back as the reference says.
module tb_path_deselector;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  route_t      rt;
  logic [63:0] pin, dout;
  int checks = 0, failures = 0;
  logic clk = 0;

  path_deselector dut (.route_i(rt), .paths_i(pin), .data_o(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (60) begin
      logic [63:0] m2, m3, exp;
      int dest [64];
      ref_rand_route(m2, m3);
      rt.m2 = m2; rt.m3 = m3;
      ref_map(m2, m3, dest);
      for (int i = 0; i < 64; i++) begin
        pin = 64'd1 << dest[i];
        #1;
        checks++;
        if (dout !== (64'd1 << i)) begin
          failures++;
          $display("FAIL path %0d -> %h, expected bit %0d", dest[i], dout, i);
        end
      end
      repeat (20) begin
        logic [63:0] w;
        w = rand_word();
        pin = ref_order(m2, m3, w);
        #1;
        checks++;
        if (dout !== w) begin
          failures++;
          $display("FAIL random %h -> %h", w, dout);
        end
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
