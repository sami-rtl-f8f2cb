// sample_period: counts the packets delivered in the network and raises period_end for one cycle
// when PERIOD_PKTS packets have been counted, then starts the next period. The sample period is
// the interval over which traffic is recorded for prediction and over which the migration
// thresholds are re-adapted; the document measures it in packets and finds 15k packets best for
// the core trigger, which is the default here. How packets are counted (pkt_cnt packets per
// cycle; a surplus beyond the period carries into the next one) is this design's choice.
module sample_period #(
  parameter int unsigned PERIOD_PKTS = 15000,
  parameter int unsigned CNT_IN_W    = 8       // width of the per-cycle packet count
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [CNT_IN_W-1:0] pkt_cnt,     // packets delivered this cycle
  output logic                period_end   // one-cycle pulse
);
  localparam int unsigned W = $clog2(PERIOD_PKTS + (1 << CNT_IN_W)) + 1;

  logic [W-1:0] cnt, nxt;

  assign nxt = cnt + W'(pkt_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      period_end <= 1'b0;
    end else if (nxt >= W'(PERIOD_PKTS)) begin
      cnt        <= nxt - W'(PERIOD_PKTS);
      period_end <= 1'b1;
    end else begin
      cnt        <= nxt;
      period_end <= 1'b0;
    end
  end

endmodule
