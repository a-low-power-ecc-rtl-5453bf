// path_selector: ranks the data bits by how often they toggle and routes the
// data paths onto the check bit generator's input paths.
//
// Ranking. The correlation detector raises correlation signal i, for one
// cycle, when data bit i has made its count of transitions; bits that toggle
// more raise theirs earlier. Any correlation signal clocks two shift
// registers that fill with ones: a 21-bit one, then a 35-bit one. While the
// 21-bit register is not full, the arriving bit is recorded in the weight-2
// group register; then, while the 35-bit register is not full, in the
// weight-3 group register. The full 21-bit register turns the weight-2 group
// off and the weight-3 group on; the full 35-bit register turns the weight-3
// group off and the weight-4 group on, which takes the eight bits left. So
// the 21 busiest bits get the weight-2 columns, the next 35 the weight-3
// columns and the 8 quietest the weight-4 columns. rank_done_o rises when the
// 35-bit register is full; later correlation signals are ignored until
// restart_i clears the ranking for the next analysis interval.
//
// Routing. Two routes are held: the active one, in use by the stored check
// bits, and the learned one just ranked. commit_i copies the learned route
// into the active one. use_learned_i routes through the learned route for
// one cycle, which the check bit update needs. The switch is combinational:
// data bit i drives input path route_map(route)[i], bits of one group taking
// that group's paths in increasing bit order. route_o is the route in use in
// the same cycle, for the path de-selector.
//
// The group sizes, the two shift registers, the group registers and the
// busy-to-light assignment follow the published scheme. Holding two routes,
// the bit order inside a group the identity route at reset and the empty learned route at reset are this
// design's own choices.
module path_selector
  import ecc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  data_t  corr_i,         // correlation signals, at most one high
  input  logic   restart_i,      // clear the ranking, start a new interval
  input  logic   commit_i,       // active route <= learned route
  input  logic   use_learned_i,  // route through the learned route now
  input  data_t  data_i,         // data paths 1..64 (bit 0..63)
  output data_t  paths_o,        // check bit generator input paths
  output route_t route_o,        // route used for paths_o
  output route_t learned_o,
  output logic   rank_done_o
);

  logic [N_W2-1:0] sr_w2;   // 21-bit shift register
  logic [N_W3-1:0] sr_w3;   // 35-bit shift register
  route_t learned_q, active_q;
  logic   w2_on, w3_on;

  assign w2_on       = !sr_w2[N_W2-1];
  assign w3_on       = sr_w2[N_W2-1] && !sr_w3[N_W3-1];
  assign rank_done_o = sr_w3[N_W3-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_w2     <= '0;
      sr_w3     <= '0;
      learned_q <= '0;
      active_q  <= ROUTE_IDENTITY;
    end else begin
      if (restart_i) begin
        sr_w2        <= '0;
        sr_w3        <= '0;
        learned_q.m2 <= '0;
        learned_q.m3 <= '0;
      end else if (|corr_i) begin
        if (w2_on) begin
          sr_w2        <= {sr_w2[N_W2-2:0], 1'b1};
          learned_q.m2 <= learned_q.m2 | corr_i;
        end else if (w3_on) begin
          sr_w3        <= {sr_w3[N_W3-2:0], 1'b1};
          learned_q.m3 <= learned_q.m3 | corr_i;
        end
      end
      if (commit_i) active_q <= learned_q;
    end
  end

  assign route_o   = use_learned_i ? learned_q : active_q;
  assign learned_o = learned_q;

  route_map_t map;

  always_comb begin
    map     = route_map(route_o);
    paths_o = '0;
    for (int i = 0; i < int'(DATA_W); i++)
      paths_o[map[i]] = data_i[i];
  end

  // The detector staggers its correlation signals: never two at once.
  a_one_corr : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(corr_i));
  // A route is only taken over once it is complete.
  a_commit_done : assert property (@(posedge clk) disable iff (!rst_n) commit_i |-> rank_done_o);

endmodule
