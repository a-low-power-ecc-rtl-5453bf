// path_deselector: undoes the path selector's ordering.
//
// The path selector drives input path route_map(route)[i] of the check bit
// generator from data bit i. The de-selector takes a vector over input paths
// (the decoder's error position) and returns it in data bit order: output
// bit i is input bit route_map(route)[i]. It is the path selector's switch
// with inputs and outputs exchanged, and must be given the same route the
// selector used for the word. Combinational.
module path_deselector
  import ecc_pkg::*;
(
  input  route_t route_i,
  input  data_t  paths_i,   // vector in input path order
  output data_t  data_o     // same vector in data bit order
);

  route_map_t map;

  always_comb begin
    map = route_map(route_i);
    for (int i = 0; i < int'(DATA_W); i++)
      data_o[i] = paths_i[map[i]];
  end

endmodule
