// ecc_pkg: constants, types and the H-matrix of the 64-bit minimum weight
// column code shared by the ECC blocks.
//
// The code corrects single errors only (SEC). It protects 64 data bits with
// 7 check bits. Every H-matrix column is a distinct 7-bit vector with as few
// ones as possible: all 21 weight-2 columns, all 35 weight-3 columns and 8 of
// the 35 weight-4 columns, 179 ones in total, so that no row holds more than
// 26 ones. The weights, the group sizes, the total and the row bound are the
// code's published figures; the concrete column order and the choice of the
// eight weight-4 columns are this design's own.
//
// Input path numbering of the check bit generator (0-based here):
//   paths  0..20  weight-2 columns, in increasing numeric order of the column
//   paths 21..55  weight-3 columns, in increasing numeric order
//   paths 56..63  the eight weight-4 columns of W4_COLS
// Bit r of a column is row r, that is, check bit r.
//
// The eight weight-4 columns give rows 0,1,3,5 five ones and rows 2,4,6 four,
// so the row weights are 26,26,25,26,25,26,25.
//
// A route says which data bit drives which input path. It holds the set of
// data bits assigned to the weight-2 paths (m2) and to the weight-3 paths
// (m3); the remaining bits go to the weight-4 paths. Inside a group the data
// bits are placed in increasing bit order.
package ecc_pkg;

  localparam int unsigned DATA_W  = 64;
  localparam int unsigned CHECK_W = 7;
  localparam int unsigned N_W2    = 21;  // 7 choose 2
  localparam int unsigned N_W3    = 35;  // 7 choose 3
  localparam int unsigned N_W4    = 8;   // weight-4 columns actually used
  localparam int unsigned BASE_W3 = N_W2;
  localparam int unsigned BASE_W4 = N_W2 + N_W3;
  localparam int unsigned PATH_IDX_W = $clog2(DATA_W);

  typedef logic [DATA_W-1:0]     data_t;
  typedef logic [CHECK_W-1:0]    check_t;
  typedef logic [PATH_IDX_W-1:0] path_idx_t;

  typedef struct packed {
    data_t m2;  // data bits routed to the weight-2 input paths
    data_t m3;  // data bits routed to the weight-3 input paths
  } route_t;

  // Weight-4 columns in use, in increasing numeric order.
  localparam check_t W4_COLS [N_W4] = '{
    7'h0F, 7'h1E, 7'h2B, 7'h3C, 7'h47, 7'h63, 7'h71, 7'h78
  };

  function automatic int unsigned popcount7(check_t v);
    int unsigned n = 0;
    for (int b = 0; b < int'(CHECK_W); b++) n += int'(v[b]);
    return n;
  endfunction

  // k-th (0-based) 7-bit vector of weight w, in increasing numeric order.
  function automatic check_t kth_of_weight(int unsigned w, int unsigned k);
    int unsigned seen = 0;
    check_t col = '0;
    for (int v = 1; v < (1 << CHECK_W); v++) begin
      if (popcount7(check_t'(v)) == w) begin
        if (seen == k) col = check_t'(v);
        seen++;
      end
    end
    return col;
  endfunction

  // H-matrix column of input path p.
  function automatic check_t h_column(int unsigned p);
    if (p < BASE_W3)      return kth_of_weight(2, p);
    else if (p < BASE_W4) return kth_of_weight(3, p - BASE_W3);
    else                  return W4_COLS[p - BASE_W4];
  endfunction

  // Row r of the H-matrix as a mask over the 64 input paths.
  function automatic data_t h_row(logic [$clog2(CHECK_W)-1:0] r);
    data_t m = '0;
    for (int p = 0; p < int'(DATA_W); p++) begin
      check_t c = h_column(p);
      m[p] = c[r];
    end
    return m;
  endfunction

  // Route at reset: data bit i drives input path i.
  localparam route_t ROUTE_IDENTITY = '{
    m2: data_t'((64'd1 << N_W2) - 1),
    m3: data_t'(((64'd1 << N_W3) - 1) << N_W2)
  };

  typedef path_idx_t route_map_t [DATA_W];

  // Input path of every data bit under route rt: one walk over the bits with
  // a running count per group.
  function automatic route_map_t route_map(route_t rt);
    route_map_t map;
    path_idx_t  n2 = '0;
    path_idx_t  n3 = path_idx_t'(BASE_W3);
    path_idx_t  n4 = path_idx_t'(BASE_W4);
    for (int i = 0; i < int'(DATA_W); i++) begin
      if (rt.m2[i]) begin
        map[i] = n2; n2 += 1'b1;
      end else if (rt.m3[i]) begin
        map[i] = n3; n3 += 1'b1;
      end else begin
        map[i] = n4; n4 += 1'b1;
      end
    end
    return map;
  endfunction

endpackage
