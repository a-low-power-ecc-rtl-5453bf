// dram_core_model: behavioural model of the data bit and check bit memory
// cores for the testbenches. 2**ADDR_W words of 64 data bits and 7 check
// bits. A read (re) returns the word on the next cycle; data and check bits
// are written separately (dwe, cwe). Not synthesizable as a DRAM; the arrays
// are public so a testbench can preset them and inject errors.
module dram_core_model #(
  parameter int unsigned ADDR_W = 6
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              re,
  input  logic              dwe,
  input  logic              cwe,
  input  logic [63:0]       wdata,
  input  logic [6:0]        wcheck,
  output logic [63:0]       rdata,
  output logic [6:0]        rcheck
);

  logic [63:0] data  [2**ADDR_W];
  logic [6:0]  check [2**ADDR_W];

  initial begin
    for (longint a = 0; a < 2**ADDR_W; a++) begin
      data[ADDR_W'(a)]  = '0;
      check[ADDR_W'(a)] = '0;
    end
    rdata  = '0;
    rcheck = '0;
  end

  always @(posedge clk) begin
    if (re) begin
      rdata  <= data[addr];
      rcheck <= check[addr];
    end
    if (dwe) data[addr]  <= wdata;
    if (cwe) check[addr] <= wcheck;
  end

endmodule
