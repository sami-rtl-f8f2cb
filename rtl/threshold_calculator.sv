// threshold_calculator: the Threshold Calculator (TC). Once per sample period it sets the core
// congestion threshold th_c and the region congestion threshold th_r from the average core and
// region congestion and from the predicted application traffic.
//
// The document fixes the inputs (average congestion, prediction) and the lower bounds that keep
// low traffic from causing migrations, not the formula. This design uses
//   g    = pred_total / act_total            (predicted traffic change, Q8, at most G_MAX_Q8;
//                                             1.0 when nothing was sent last period)
//   p    = avg * g                           (average congestion expected next period)
//   th   = max(TH_MIN, p + (p >> MARGIN_SHIFT))
// for both thresholds, each with its own lower bound, saturated to the output width.
//
// Timing: update (one cycle) latches g at the next edge; th_c, th_r and the one-cycle th_valid
// follow one cycle later. After reset the thresholds sit at their lower bounds.
module threshold_calculator
  import sami_pkg::*;
#(
  parameter int unsigned TOT_W        = 22,
  parameter int unsigned TH_C_MIN     = 128,   // 0.5 packet/cycle into a router
  parameter int unsigned TH_R_MIN     = 2048,  // 16 cores at the core bound
  parameter int unsigned MARGIN_SHIFT = 2,     // threshold 25 % above the expected average
  parameter int unsigned G_MAX_Q8     = 1024   // growth factor limited to 4.0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              update,
  input  logic [CONG_W-1:0] avg_cc,
  input  logic [REG_W-1:0]  avg_rc,
  input  logic [TOT_W-1:0]  pred_total,
  input  logic [TOT_W-1:0]  act_total,
  output logic [CONG_W-1:0] th_c,
  output logic [REG_W-1:0]  th_r,
  output logic              th_valid
);
  localparam int unsigned DIV_W = TOT_W + 8;
  localparam int unsigned G_W   = $clog2(G_MAX_Q8) + 1;
  localparam int unsigned P_W   = REG_W + G_W;

  logic [G_W-1:0]    g;
  logic [CONG_W-1:0] avg_cc_q;
  logic [REG_W-1:0]  avg_rc_q;
  logic              stage2;
  logic [DIV_W-1:0]  ratio;

  assign ratio = (act_total == '0) ? DIV_W'(256)
               : (DIV_W'(pred_total) << 8) / DIV_W'(act_total);

  function automatic logic [P_W-1:0] thresh(logic [P_W-1:0] avg, logic [G_W-1:0] gq,
                                            int unsigned lo);
    logic [P_W+G_W-1:0] p;
    logic [P_W+G_W-1:0] t;
    p = ((P_W+G_W)'(avg) * (P_W+G_W)'(gq)) >> 8;
    t = p + (p >> MARGIN_SHIFT);
    if (t < (P_W+G_W)'(lo)) t = (P_W+G_W)'(lo);
    return (t > (P_W+G_W)'({P_W{1'b1}})) ? '1 : P_W'(t);
  endfunction

  logic [P_W-1:0] tc, tr;
  assign tc = thresh(P_W'(avg_cc_q), g, TH_C_MIN);
  assign tr = thresh(P_W'(avg_rc_q), g, TH_R_MIN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g        <= G_W'(256);
      avg_cc_q <= '0;
      avg_rc_q <= '0;
      stage2   <= 1'b0;
      th_c     <= CONG_W'(TH_C_MIN);
      th_r     <= REG_W'(TH_R_MIN);
      th_valid <= 1'b0;
    end else begin
      stage2   <= update;
      th_valid <= stage2;
      if (update) begin
        g        <= (ratio > DIV_W'(G_MAX_Q8)) ? G_W'(G_MAX_Q8) : G_W'(ratio);
        avg_cc_q <= avg_cc;
        avg_rc_q <= avg_rc;
      end
      if (stage2) begin
        th_c <= (tc > P_W'({CONG_W{1'b1}})) ? '1 : CONG_W'(tc);
        th_r <= (tr > P_W'({REG_W{1'b1}}))  ? '1 : REG_W'(tr);
      end
    end
  end

endmodule
