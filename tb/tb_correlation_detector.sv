// tb_correlation_detector: random writes with a different toggle rate per
// bit. A reference counts each bit's transitions; a bit that reaches
// 2**CNT_W must be reported once, one cycle after the write at the earliest,
// one report per cycle, the lowest waiting bit first. Checks the reported
// pulses cycle by cycle, that bits reaching their count together occur
// (ties), and that clear starts a new interval.
module tb_correlation_detector;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int CNT_W = 3;
  localparam int LIMIT = 1 << CNT_W;

  logic  clk = 0, rst_n = 0;
  logic  clear = 0, wr_en = 0;
  data_t wr_data = '0, corr;
  int checks = 0, failures = 0;

  correlation_detector #(.CNT_W(CNT_W)) dut (
    .clk, .rst_n, .clear_i(clear), .wr_en_i(wr_en), .wr_data_i(wr_data), .corr_o(corr)
  );

  always #5 clk = ~clk;

  // Reference state.
  word_t m_prev = '0, m_reached = '0, m_sent = '0, exp_corr = '0;
  int    m_cnt [64];
  int    ties = 0, reports = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      word_t waiting, newly;
      waiting  = m_reached & ~m_sent;
      exp_corr = '0;
      for (int i = 63; i >= 0; i--) if (waiting[i]) exp_corr = word_t'(1) << i;
      newly = '0;
      if (wr_en) begin
        for (int i = 0; i < 64; i++)
          if (wr_data[i] != m_prev[i] && !m_reached[i]) begin
            m_cnt[i]++;
            if (m_cnt[i] == LIMIT) newly[i] = 1'b1;
          end
        m_prev = wr_data;
      end
      if ($countones(newly) > 1) ties++;
      m_sent    = m_sent | exp_corr;
      m_reached = m_reached | newly;
      if (clear) begin
        m_reached = '0; m_sent = '0; exp_corr = '0;
        foreach (m_cnt[i]) m_cnt[i] = 0;
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (corr !== exp_corr) begin
        failures++;
        $display("FAIL t=%0t corr=%h expected %h", $time, corr, exp_corr);
      end
      if (corr != '0) reports++;
    end
  end

  task automatic run_interval(int cycles);
    int rate [64];
    for (int i = 0; i < 64; i++) rate[i] = int'($urandom_range(100, 0));
    // a few bits share the top rate so that some reach the count together
    for (int i = 0; i < 6; i++) rate[$urandom_range(63, 0)] = 100;
    repeat (cycles) begin
      @(negedge clk);
      wr_en = ($urandom_range(99, 0) < 70);
      for (int i = 0; i < 64; i++)
        wr_data[i] = (int'($urandom_range(99, 0)) < rate[i]) ? ~m_prev[i] : m_prev[i];
    end
    @(negedge clk);
    wr_en = 0;
    repeat (70) @(negedge clk);  // let every waiting report go out
  endtask

  initial begin
    foreach (m_cnt[i]) m_cnt[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_interval(60);
    checks++;
    if (m_sent != m_reached || m_sent == '0) begin
      failures++;
      $display("FAIL not every reached bit reported: %h vs %h", m_sent, m_reached);
    end
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    run_interval(200);
    checks++;
    if (m_sent != m_reached || $countones(m_sent) < 40) begin
      failures++;
      $display("FAIL second interval: %h vs %h", m_sent, m_reached);
    end
    checks++;
    if (ties == 0) begin
      failures++;
      $display("FAIL no two bits reached their count together");
    end
    $display("reports=%0d ties=%0d", reports, ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
