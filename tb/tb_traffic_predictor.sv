// tb_traffic_predictor: eight flows over 60 sample periods. Flows 0-3 repeat a two-period
// pattern (a burst of 10 packets, then 40), which the long-term predictor must learn: after a
// warm-up their selector has to choose it and the prediction has to equal the next period's
// traffic exactly. Flows 4-7 send random traffic. Every period the outputs are compared with a
// reference model of the short-term, long-term and selector rules kept in integers.
module tb_traffic_predictor;
  localparam int F = 8, CW = 16, HL = 2, LB = 2, QS = 3;
  localparam int HB = HL * LB, D = 1 << HB;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [F-1:0] flow_pkt = '0;
  logic period_end = 1'b0;
  logic [CW-1:0] pred [F];
  logic [F-1:0] sel;
  logic [CW+$clog2(F)-1:0] pred_total, act_total;
  logic pred_valid;
  int checks = 0, failures = 0;

  traffic_predictor #(.NUM_FLOWS(F), .CNT_W(CW), .HIST_LEN(HL), .LVL_BITS(LB), .Q_SHIFT(QS))
    dut (.clk, .rst_n, .flow_pkt, .period_end, .pred, .sel, .pred_total, .act_total, .pred_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int m_aprev [F], m_long [F], m_hist [F], m_sel [F];
  int m_tbl [F][D];
  int learned = 0;

  function automatic int lvl(int a);
    return ((a >> QS) > 3) ? 3 : (a >> QS);
  endfunction
  function automatic int adiff(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int want [F];
    int cnt [F];
    int hn, ps, as;
    for (int f = 0; f < F; f++) begin
      m_aprev[f] = 0; m_long[f] = 0; m_hist[f] = 0; m_sel[f] = 0;
      for (int e = 0; e < D; e++) m_tbl[f][e] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 60; p++) begin
      for (int f = 0; f < F; f++) begin
        want[f] = (f < 4) ? ((p % 2 == 0) ? 10 : 40) : int'($urandom_range(0, 60));
        cnt[f]  = 0;
      end
      // 64 cycles of traffic: flow f sends in its first want[f] cycles
      for (int c = 0; c < 64; c++) begin
        @(negedge clk);
        for (int f = 0; f < F; f++) begin
          flow_pkt[f] = (c < want[f]);
          if (c < want[f]) cnt[f]++;
        end
      end
      @(negedge clk);
      flow_pkt   = '0;
      period_end = 1'b1;
      // reference update
      for (int f = 0; f < F; f++) begin
        hn = ((m_hist[f] << LB) | lvl(cnt[f])) & (D - 1);
        m_sel[f] = (adiff(cnt[f], m_long[f]) < adiff(cnt[f], m_aprev[f])) ? 1 : 0;
        m_tbl[f][m_hist[f]] = cnt[f];
        m_long[f]  = m_tbl[f][hn];
        m_hist[f]  = hn;
        m_aprev[f] = cnt[f];
      end
      @(negedge clk);
      period_end = 1'b0;
      ps = 0; as = 0;
      for (int f = 0; f < F; f++) begin
        int exp_p;
        exp_p = m_sel[f] ? m_long[f] : m_aprev[f];
        check("sel", int'(sel[f]), m_sel[f]);
        check("pred", int'(pred[f]), exp_p);
        ps += exp_p;
        as += m_aprev[f];
        // the repeating flows must be predicted exactly by the long-term table once learned
        if (f < 4 && p >= 8) begin
          check("long-term chosen", int'(sel[f]), 1);
          check("exact prediction", int'(pred[f]), (p % 2 == 0) ? 40 : 10);
          if (sel[f]) learned++;
        end
      end
      check("pred_valid low", int'(pred_valid), 0);
      @(negedge clk);
      check("pred_valid", int'(pred_valid), 1);
      check("pred_total", int'(pred_total), ps);
      check("act_total", int'(act_total), as);
    end
    check("long-term predictor used", int'(learned > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
