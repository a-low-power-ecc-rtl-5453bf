// correlation_detector: counts the transitions of every written data bit and
// reports, bit by bit, when a bit has toggled TRANSITIONS = 2**CNT_W times.
//
// Per data bit there is a pulse generator and a counter. The pulse generator
// compares the bit of each written word with the same bit of the previous
// written word and gives a count pulse when they differ. The counter is
// CNT_W bits wide; the pulse that carries it past its top value sets the
// bit's "reached" flag, and the counter then stops. Bits that toggle more
// reach their count earlier, so the order in which the flags are set ranks
// the bits by transition activity.
//
// Correlation signal i is a one-cycle pulse on corr_o[i]. Flags set in the
// same cycle are sent one per cycle, lowest bit first, so that the path
// selector sees them one at a time; this plays the part of the per-bit delay
// stages in front of each correlation signal. Each bit is reported at most
// once per analysis interval. clear_i starts a new interval: counters, flags
// and the sent record are cleared; the previous-word register is kept.
//
// Timing: a write in cycle t updates the counters at the end of t; a flag set
// then is reported in cycle t+1 at the earliest (corr_o is registered).
//
// The pulse generator, one counter per bit and one correlation signal per
// bit follow the published scheme; the counter width is this design's own
// choice, as is sending simultaneous flags lowest bit first.
module correlation_detector
  import ecc_pkg::*;
#(
  parameter int unsigned CNT_W = 8   // count 2**CNT_W transitions
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear_i,    // start a new analysis interval
  input  logic  wr_en_i,    // a word is being written
  input  data_t wr_data_i,  // the written word
  output data_t corr_o      // correlation signals, one-cycle pulses
);

  data_t            prev_q;               // previous written word
  logic [CNT_W-1:0] cnt_q [DATA_W];       // transition counters
  data_t            reached_q;            // count reached
  data_t            sent_q;               // already reported
  data_t            pulse;                // transition on this write
  data_t            waiting;
  data_t            grant;

  assign pulse   = wr_en_i ? (wr_data_i ^ prev_q) : '0;
  assign waiting = reached_q & ~sent_q;
  assign grant   = waiting & (~waiting + data_t'(1));  // lowest set bit

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q    <= '0;
      reached_q <= '0;
      sent_q    <= '0;
      corr_o    <= '0;
      for (int i = 0; i < int'(DATA_W); i++) cnt_q[i] <= '0;
    end else begin
      if (wr_en_i) prev_q <= wr_data_i;
      if (clear_i) begin
        reached_q <= '0;
        sent_q    <= '0;
        corr_o    <= '0;
        for (int i = 0; i < int'(DATA_W); i++) cnt_q[i] <= '0;
      end else begin
        for (int i = 0; i < int'(DATA_W); i++) begin
          if (pulse[i] && !reached_q[i]) begin
            cnt_q[i] <= cnt_q[i] + 1'b1;
            if (&cnt_q[i]) reached_q[i] <= 1'b1;
          end
        end
        sent_q <= sent_q | grant;
        corr_o <= grant;
      end
    end
  end

endmodule
