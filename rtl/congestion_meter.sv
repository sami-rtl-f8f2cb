// congestion_meter: the per-router congestion meter. Each input link of the router reports one
// pulse per packet it carries; the meter keeps an exponential moving average of that packet flow
// per link and outputs the sum over the links as the router's congestion level, which the
// router's Manager Node collects.
//
// Each link has a leaky accumulator acc <= acc - (acc >> ALPHA) + (pkt ? 2^CONG_FRAC : 0). In
// steady state acc >> ALPHA equals the packet rate in units of 2^-CONG_FRAC packets per cycle,
// averaged over about 2^ALPHA cycles. level is a sum of registered averages: it reflects pulses up to the previous
// cycle. Measuring a moving average of the packet flow on every link follows the document; the
// exponential form, the window and the fixed-point scaling are this design's choices.
module congestion_meter
  import sami_pkg::*;
#(
  parameter int unsigned N_LINKS = 5,  // N, E, S, W and local input links
  parameter int unsigned ALPHA   = 4   // averaging window 2^ALPHA cycles
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_LINKS-1:0]  pkt,     // one pulse per packet received on each link
  output logic [CONG_W-1:0]   level    // sum of the link averages
);
  localparam int unsigned ACC_W = CONG_FRAC + ALPHA + 1;

  logic [ACC_W-1:0] acc [N_LINKS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_LINKS; i++) acc[i] <= '0;
    end else begin
      for (int i = 0; i < N_LINKS; i++)
        acc[i] <= acc[i] - (acc[i] >> ALPHA) + (pkt[i] ? ACC_W'(1 << CONG_FRAC) : '0);
    end
  end

  always_comb begin
    logic [CONG_W-1:0] sum;
    sum = '0;
    for (int i = 0; i < N_LINKS; i++) sum += CONG_W'(acc[i] >> ALPHA);
    level = sum;
  end

endmodule
