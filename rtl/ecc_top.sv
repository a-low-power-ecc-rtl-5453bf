// ecc_top: on-chip SEC ECC of a DRAM with on-line input ordering for a
// low-power check bit generator.
//
// The check bit generator is a set of XOR trees; its switching power depends
// on which data bit drives which tree input. Under the minimum weight column
// code (ecc_pkg) 21 inputs feed two trees, 35 feed three and 8 feed four. The
// design watches the written data, ranks the 64 data bits by how often they
// toggle, and routes the busiest bits to the inputs that feed fewest trees.
//
// Blocks:
//   correlation_detector  counts transitions of each written bit, pulses a
//                         correlation signal when a bit reaches its count
//   path_selector         ranks bits from the correlation signals, routes
//                         data bits to generator input paths
//   check_bit_generator   7 check bits from the 64 input paths
//   syndrome_generator    read check bits xor stored check bits
//   ecc_decoder           syndrome -> input path in error
//   path_deselector       input path -> data bit
//   corrector             flips the located data bit
//   check_bit_updater     regenerates all stored check bits under a newly
//                         ranked route, then makes that route active
// The data bit and check bit memory cores are outside; their ports are
// brought out (mem_*).
//
// Host interface (this design's own): a request is taken when req_valid_i and
// req_ready_o are high. A write stores req_wdata_i and its check bits in the
// same cycle. A read drives mem_re_o; the memory returns data and check bits
// the next cycle, when rsp_valid_o is high with the corrected word and flags.
// req_ready_o is low in that response cycle (the read uses the shared check
// bit generator), once a ranking is complete, and while the updater runs.
//
// Memory interface: mem_addr_o with mem_re_o (read, answered next cycle on
// mem_rdata_i/mem_rcheck_i), mem_data_we_o (write mem_wdata_o) and
// mem_check_we_o (write mem_wcheck_o).
module ecc_top
  import ecc_pkg::*;
#(
  parameter int unsigned ADDR_W = 24,  // 2**24 64-bit words = 1 Gb
  parameter int unsigned CNT_W  = 8    // correlation count 2**CNT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // host
  input  logic              req_valid_i,
  output logic              req_ready_o,
  input  logic              req_write_i,
  input  logic [ADDR_W-1:0] req_addr_i,
  input  data_t             req_wdata_i,
  output logic              rsp_valid_o,
  output data_t             rsp_rdata_o,
  output logic              rsp_corrected_o,     // a data bit was corrected
  output logic              rsp_check_err_o,     // a stored check bit was wrong
  output logic              rsp_uncorrectable_o, // syndrome matches no column
  // data bit and check bit memory cores
  output logic [ADDR_W-1:0] mem_addr_o,
  output logic              mem_re_o,
  output logic              mem_data_we_o,
  output logic              mem_check_we_o,
  output data_t             mem_wdata_o,
  output check_t            mem_wcheck_o,
  input  data_t             mem_rdata_i,
  input  check_t            mem_rcheck_i,
  // status
  output logic              reorder_busy_o,
  output route_t            active_route_o,  // route in use this cycle
  output route_t            learned_route_o  // route of the current ranking
);

  logic   wr_fire, rd_fire, rd_pend_q, upd_rd_q;
  data_t  corr;
  logic   rank_done;
  data_t  sel_in, paths;
  route_t route, learned;
  check_t gen_check, syndrome;
  data_t  err_path, err_bits, corr_data;
  logic   check_err, uncorrectable, corrected;

  logic              upd_busy, upd_commit, upd_use_learned, upd_sel_wb;
  logic [ADDR_W-1:0] upd_addr;
  logic              upd_re, upd_data_we, upd_check_we;
  data_t             upd_wb;

  assign req_ready_o = !upd_busy && !rd_pend_q && !rank_done;
  assign wr_fire     = req_valid_i && req_ready_o && req_write_i;
  assign rd_fire     = req_valid_i && req_ready_o && !req_write_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend_q <= 1'b0;
      upd_rd_q  <= 1'b0;
    end else begin
      rd_pend_q <= rd_fire;
      upd_rd_q  <= upd_re;
    end
  end

  correlation_detector #(.CNT_W(CNT_W)) u_detector (
    .clk, .rst_n,
    .clear_i   (upd_commit),
    .wr_en_i   (wr_fire),
    .wr_data_i (req_wdata_i),
    .corr_o    (corr)
  );

  // Path selector input: write data, read data, or the updater's word.
  always_comb begin
    if (upd_sel_wb)                  sel_in = upd_wb;
    else if (rd_pend_q || upd_rd_q)  sel_in = mem_rdata_i;
    else                             sel_in = req_wdata_i;
  end

  path_selector u_selector (
    .clk, .rst_n,
    .corr_i        (corr),
    .restart_i     (upd_commit),
    .commit_i      (upd_commit),
    .use_learned_i (upd_use_learned),
    .data_i        (sel_in),
    .paths_o       (paths),
    .route_o       (route),
    .learned_o     (learned),
    .rank_done_o   (rank_done)
  );

  check_bit_generator u_generator (.paths_i(paths), .check_o(gen_check));

  syndrome_generator u_syndrome (
    .read_check_i  (gen_check),
    .write_check_i (mem_rcheck_i),
    .syndrome_o    (syndrome)
  );

  ecc_decoder u_decoder (
    .syndrome_i      (syndrome),
    .err_path_o      (err_path),
    .check_err_o     (check_err),
    .uncorrectable_o (uncorrectable)
  );

  path_deselector u_deselector (
    .route_i (route),
    .paths_i (err_path),
    .data_o  (err_bits)
  );

  corrector u_corrector (
    .data_i      (mem_rdata_i),
    .err_bits_i  (err_bits),
    .data_o      (corr_data),
    .corrected_o (corrected)
  );

  check_bit_updater #(.ADDR_W(ADDR_W)) u_updater (
    .clk, .rst_n,
    .start_i        (rank_done && !rd_pend_q),
    .busy_o         (upd_busy),
    .mem_addr_o     (upd_addr),
    .mem_re_o       (upd_re),
    .mem_data_we_o  (upd_data_we),
    .mem_check_we_o (upd_check_we),
    .use_learned_o  (upd_use_learned),
    .sel_wb_o       (upd_sel_wb),
    .corr_data_i    (corr_data),
    .corrected_i    (corrected),
    .wb_data_o      (upd_wb),
    .commit_o       (upd_commit)
  );

  // Memory core ports: the updater owns them while busy.
  always_comb begin
    if (upd_busy) begin
      mem_addr_o     = upd_addr;
      mem_re_o       = upd_re;
      mem_data_we_o  = upd_data_we;
      mem_check_we_o = upd_check_we;
      mem_wdata_o    = upd_wb;
    end else begin
      mem_addr_o     = req_addr_i;
      mem_re_o       = rd_fire;
      mem_data_we_o  = wr_fire;
      mem_check_we_o = wr_fire;
      mem_wdata_o    = req_wdata_i;
    end
  end
  assign mem_wcheck_o = gen_check;

  assign rsp_valid_o         = rd_pend_q;
  assign rsp_rdata_o         = corr_data;
  assign rsp_corrected_o     = rd_pend_q && corrected;
  assign rsp_check_err_o     = rd_pend_q && check_err;
  assign rsp_uncorrectable_o = rd_pend_q && uncorrectable;
  assign reorder_busy_o      = upd_busy;
  assign active_route_o      = route;
  assign learned_route_o     = learned;

endmodule
