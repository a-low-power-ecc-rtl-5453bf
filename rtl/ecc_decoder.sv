// ecc_decoder: turns a syndrome into the position of the single error.
//
// Input path p is in error when the syndrome equals its H-matrix column; the
// result is a one-hot (or zero) vector over the 64 input paths, still in the
// check bit generator's order, which the path de-selector maps back to data
// bit order. Every data column has weight 2 or more, so a weight-1 syndrome
// means one stored check bit flipped and the data is good (check_err_o). A
// non-zero syndrome that matches no column cannot come from a single error
// and is flagged as uncorrectable (uncorrectable_o); the code is SEC only, so
// double errors are in general not detected. The two flags are this design's
// own addition. Combinational.
module ecc_decoder
  import ecc_pkg::*;
(
  input  check_t syndrome_i,
  output data_t  err_path_o,       // one-hot input path in error
  output logic   check_err_o,      // a check bit, not a data bit, is wrong
  output logic   uncorrectable_o   // non-zero syndrome matching no column
);

  for (genvar p = 0; p < DATA_W; p++) begin : g_col
    localparam check_t COL = h_column(p);
    assign err_path_o[p] = (syndrome_i == COL);
  end

  always_comb begin
    check_err_o     = (popcount7(syndrome_i) == 1);
    uncorrectable_o = (syndrome_i != '0) && !check_err_o && (err_path_o == '0);
  end

endmodule
