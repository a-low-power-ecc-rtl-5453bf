// check_bit_updater: rewrites the stored check bits after a new input
// ordering has been ranked, then switches the ordering over.
//
// Check bits already in the check bit memory were generated under the active
// route. Before the learned route may replace it, every word's check bits
// must be regenerated under the learned route. Started by start_i, the
// updater walks all 2**ADDR_W addresses, three cycles each:
//   RD   read the data word and its check bits (memory answers next cycle);
//   CAP  the read path checks and corrects the word under the ACTIVE route;
//        the corrected word is captured;
//   WR   the captured word is driven into the path selector, which uses the
//        LEARNED route (use_learned_o); the new check bits are written back,
//        and the data word too if it was corrected.
// After the last address COMMIT pulses commit_o for one cycle: the top copies
// the learned route into the active one and starts a new analysis interval.
// busy_o is high from start to commit; host accesses wait meanwhile.
//
// That the check bits are updated when the generator changes comes from the
// published scheme; the sequence, the write-back of corrected data and the
// memory timing (read data one cycle after the read) are this design's own.
module check_bit_updater
  import ecc_pkg::*;
#(
  parameter int unsigned ADDR_W = 24   // 2**24 64-bit words = 1 Gb
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  output logic              busy_o,
  // memory core control
  output logic [ADDR_W-1:0] mem_addr_o,
  output logic              mem_re_o,
  output logic              mem_data_we_o,
  output logic              mem_check_we_o,
  // datapath control and data
  output logic              use_learned_o,  // path selector on learned route
  output logic              sel_wb_o,       // path selector input = wb_data_o
  input  data_t             corr_data_i,    // corrector output (CAP cycle)
  input  logic              corrected_i,    // corrector changed a bit
  output data_t             wb_data_o,      // word to re-encode and write
  output logic              commit_o
);

  typedef enum logic [2:0] {S_IDLE, S_RD, S_CAP, S_WR, S_COMMIT} state_e;

  state_e            state_q;
  logic [ADDR_W-1:0] addr_q;
  data_t             wb_q;
  logic              fix_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      addr_q  <= '0;
      wb_q    <= '0;
      fix_q   <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE:   if (start_i) begin
                    state_q <= S_RD;
                    addr_q  <= '0;
                  end
        S_RD:     state_q <= S_CAP;
        S_CAP:    begin
                    wb_q    <= corr_data_i;
                    fix_q   <= corrected_i;
                    state_q <= S_WR;
                  end
        S_WR:     begin
                    addr_q  <= addr_q + 1'b1;
                    state_q <= (&addr_q) ? S_COMMIT : S_RD;
                  end
        S_COMMIT: state_q <= S_IDLE;
        default:  state_q <= S_IDLE;
      endcase
    end
  end

  assign busy_o         = (state_q != S_IDLE);
  assign mem_addr_o     = addr_q;
  assign mem_re_o       = (state_q == S_RD);
  assign mem_check_we_o = (state_q == S_WR);
  assign mem_data_we_o  = (state_q == S_WR) && fix_q;
  assign use_learned_o  = (state_q == S_WR);
  assign sel_wb_o       = (state_q == S_WR);
  assign wb_data_o      = wb_q;
  assign commit_o       = (state_q == S_COMMIT);

endmodule
