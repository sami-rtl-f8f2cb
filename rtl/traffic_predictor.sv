// traffic_predictor: end-to-end traffic prediction for NUM_FLOWS communicating task pairs.
//
// For every flow (a source task and a destination task) a counter records the packets sent in
// the current sample period. At period_end the count A_t is closed and two predictions for the
// next period are formed:
//   short-term: the last period's traffic, P = A_{t-1};
//   long-term : a per-flow table indexed by the flow's recent communication pattern (history).
//               Each entry holds the traffic seen the last time that pattern occurred; at
//               period_end the entry of the old history is overwritten with A_t, the history
//               shifts in the quantised level of A_t, and the entry of the new history becomes
//               the long-term prediction.
// A per-flow selector chooses which prediction is output. The two predictors, the table
// indexed by history and holding the traffic of the pattern's last occurrence, and a selector
// follow the document. The history format (HIST_LEN levels of LVL_BITS bits, a level being
// A >> Q_SHIFT saturated), the selector rule (long-term when its error on the period just closed
// was strictly smaller than the short-term one's), and the widths are this design's choices.
//
// Timing: period_end at cycle T updates the per-flow state at the edge ending T; pred[] is valid
// from T+1, pred_total/act_total and the one-cycle pred_valid pulse from T+2. Packets that
// arrive in the period_end cycle count towards the new period. Counters saturate.
module traffic_predictor #(
  parameter int unsigned NUM_FLOWS = 64,
  parameter int unsigned CNT_W     = 16,
  parameter int unsigned HIST_LEN  = 2,
  parameter int unsigned LVL_BITS  = 2,
  parameter int unsigned Q_SHIFT   = 7
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [NUM_FLOWS-1:0]                flow_pkt,    // one pulse per packet of a flow
  input  logic                                period_end,
  output logic [CNT_W-1:0]                    pred [NUM_FLOWS],
  output logic [NUM_FLOWS-1:0]                sel,         // 1: long-term prediction used
  output logic [CNT_W+$clog2(NUM_FLOWS)-1:0]  pred_total,  // sum of pred[] for the next period
  output logic [CNT_W+$clog2(NUM_FLOWS)-1:0]  act_total,   // traffic of the period just closed
  output logic                                pred_valid
);
  localparam int unsigned HB     = HIST_LEN * LVL_BITS;
  localparam int unsigned DEPTH  = 1 << HB;
  localparam int unsigned TOT_W  = CNT_W + $clog2(NUM_FLOWS);
  localparam int unsigned LVL_MAX = (1 << LVL_BITS) - 1;

  logic [CNT_W-1:0] a_prev    [NUM_FLOWS];
  logic [CNT_W-1:0] long_pred [NUM_FLOWS];
  logic             upd_d;

  function automatic logic [LVL_BITS-1:0] quant(logic [CNT_W-1:0] a);
    logic [CNT_W-1:0] q;
    q = a >> Q_SHIFT;
    return (q > CNT_W'(LVL_MAX)) ? LVL_BITS'(LVL_MAX) : LVL_BITS'(q);
  endfunction

  function automatic logic [CNT_W-1:0] absdiff(logic [CNT_W-1:0] a, logic [CNT_W-1:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  // One independent predictor slice, with its own history table, per flow.
  for (genvar f = 0; f < NUM_FLOWS; f++) begin : g_flow
    logic [CNT_W-1:0] cnt;
    logic [HB-1:0]    hist;
    logic [HB-1:0]    h_new;
    logic [CNT_W-1:0] tbl [DEPTH];

    assign h_new = HB'({hist, quant(cnt)});

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt          <= '0;
        a_prev[f]    <= '0;
        long_pred[f] <= '0;
        hist         <= '0;
        sel[f]       <= 1'b0;
        for (int e = 0; e < DEPTH; e++) tbl[e] <= '0;
      end else if (period_end) begin
        sel[f]       <= absdiff(cnt, long_pred[f]) < absdiff(cnt, a_prev[f]);
        tbl[hist]    <= cnt;
        hist         <= h_new;
        a_prev[f]    <= cnt;
        long_pred[f] <= (h_new == hist) ? cnt : tbl[h_new];
        cnt          <= CNT_W'(flow_pkt[f]);
      end else if (flow_pkt[f] && cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_comb begin
    for (int f = 0; f < NUM_FLOWS; f++) pred[f] = sel[f] ? long_pred[f] : a_prev[f];
  end

  logic [TOT_W-1:0] ps, as;
  always_comb begin
    ps = '0;
    as = '0;
    for (int f = 0; f < NUM_FLOWS; f++) begin
      ps += TOT_W'(pred[f]);
      as += TOT_W'(a_prev[f]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd_d      <= 1'b0;
      pred_valid <= 1'b0;
      pred_total <= '0;
      act_total  <= '0;
    end else begin
      upd_d      <= period_end;
      pred_valid <= upd_d;
      if (upd_d) begin
        pred_total <= ps;
        act_total  <= as;
      end
    end
  end

endmodule
