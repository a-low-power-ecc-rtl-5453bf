// check_bit_generator: 7 check bits of the 64-bit minimum weight column code.
//
// Check bit r is the parity of the input paths whose H-matrix column has a
// one in row r (ecc_pkg::h_row). The inputs are the check bit generator's
// input paths, already ordered by the path selector, not the raw data bits:
// paths 0..20 carry weight-2 columns, 21..55 weight-3, 56..63 weight-4, so a
// data bit that toggles often and is routed to a low-weight path feeds only
// two XOR trees instead of three or four.
//
// Each check bit is a tree of 3-input XORs. No row has more than 26 ones, so
// the row's inputs are gathered into 27 slots (unused slots are zero) and
// reduced in three levels, 27 -> 9 -> 3 -> 1, the ceil(log3 26) = 3 levels
// the code was balanced for. The row contents are constants computed at
// elaboration.
//
// Purely combinational. The same generator serves the write path (write
// check bits) and the read path (read check bits).
module check_bit_generator
  import ecc_pkg::*;
(
  input  data_t  paths_i,   // ordered input paths, path p at bit p
  output check_t check_o    // check bit r at bit r
);

  localparam int unsigned SLOTS = 27;  // 3**3 tree inputs

  typedef int unsigned slot_idx_t [SLOTS];

  // Input paths of row r, in increasing order; DATA_W marks an empty slot.
  function automatic slot_idx_t row_inputs(logic [$clog2(CHECK_W)-1:0] r);
    slot_idx_t idx;
    int unsigned n = 0;
    data_t row = h_row(r);
    for (int s = 0; s < int'(SLOTS); s++) idx[s] = DATA_W;
    for (int p = 0; p < int'(DATA_W); p++)
      if (row[p] && n < SLOTS) begin
        idx[n] = p;
        n++;
      end
    return idx;
  endfunction

  for (genvar r = 0; r < CHECK_W; r++) begin : g_row
    localparam slot_idx_t IDX = row_inputs(r);
    logic [SLOTS-1:0] lvl0;
    logic [8:0]       lvl1;
    logic [2:0]       lvl2;

    if ($countones(h_row(r)) > SLOTS) begin : g_too_wide
      $error("row %0d has more ones than the 3-level XOR tree takes", r);
    end

    for (genvar s = 0; s < SLOTS; s++) begin : g_slot
      if (IDX[s] < DATA_W) begin : g_used
        assign lvl0[s] = paths_i[IDX[s]];
      end else begin : g_empty
        assign lvl0[s] = 1'b0;
      end
    end
    for (genvar j = 0; j < 9; j++) begin : g_l1
      assign lvl1[j] = lvl0[3*j] ^ lvl0[3*j+1] ^ lvl0[3*j+2];
    end
    for (genvar j = 0; j < 3; j++) begin : g_l2
      assign lvl2[j] = lvl1[3*j] ^ lvl1[3*j+1] ^ lvl1[3*j+2];
    end
    assign check_o[r] = lvl2[0] ^ lvl2[1] ^ lvl2[2];
  end

endmodule
