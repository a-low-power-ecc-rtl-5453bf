// corrector: flips the data bit the decoder located. err_bits_i is the
// decoder's error vector after the path de-selector, so bit i refers to data
// bit i. corrected_o tells that a data bit was changed. Combinational.
module corrector
  import ecc_pkg::*;
(
  input  data_t data_i,       // data as read from the data bit memory core
  input  data_t err_bits_i,   // one-hot (or zero) error position, data order
  output data_t data_o,       // corrected data
  output logic  corrected_o
);

  assign data_o      = data_i ^ err_bits_i;
  assign corrected_o = |err_bits_i;

endmodule
