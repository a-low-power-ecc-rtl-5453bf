// syndrome_generator: compares the check bits recomputed from the read data
// (read check bits) with the check bits stored at write time (write check
// bits). The 7-bit syndrome is their bitwise difference: zero when they
// agree, otherwise the H-matrix column of the flipped position. Combinational.
module syndrome_generator
  import ecc_pkg::*;
(
  input  check_t read_check_i,   // from the check bit generator, read data
  input  check_t write_check_i,  // from the check bit memory core
  output check_t syndrome_o
);

  assign syndrome_o = read_check_i ^ write_check_i;

endmodule
