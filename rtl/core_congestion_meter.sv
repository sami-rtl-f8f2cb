// core_congestion_meter: the Core Congestion Meter (CCM). It receives the congestion level of
// every core (the CC matrix) and produces, registered once per cycle:
//   avg_cc  - the average core congestion, for the threshold calculator;
//   max_cc  - the CC measurement, the level of the most congested core, which the error node
//             compares with th_c;
//   max_idx - that core;
//   cc_vec  - the CC vector, a copy of all levels, for the task migration manager.
// Averaging and sending the vector follow the document. Using the maximum core level as the
// measurement is this design's reading of the trigger "a core whose congestion exceeds th_c".
// Ties for the maximum go to the lowest core index.
module core_congestion_meter
  import sami_pkg::*;
#(
  parameter int unsigned N_CORES = 144
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [CONG_W-1:0]          cc_in  [N_CORES],
  output logic [CONG_W-1:0]          cc_vec [N_CORES],
  output logic [CONG_W-1:0]          avg_cc,
  output logic [CONG_W-1:0]          max_cc,
  output logic [$clog2(N_CORES)-1:0] max_idx
);
  localparam int unsigned SUM_W = CONG_W + $clog2(N_CORES) + 1;

  logic [SUM_W-1:0]            sum;
  logic [CONG_W-1:0]           mx;
  logic [$clog2(N_CORES)-1:0]  mi;

  always_comb begin
    sum = '0;
    mx  = '0;
    mi  = '0;
    for (int i = 0; i < N_CORES; i++) begin
      sum += SUM_W'(cc_in[i]);
      if (cc_in[i] > mx) begin
        mx = cc_in[i];
        mi = $clog2(N_CORES)'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_CORES; i++) cc_vec[i] <= '0;
      avg_cc  <= '0;
      max_cc  <= '0;
      max_idx <= '0;
    end else begin
      for (int i = 0; i < N_CORES; i++) cc_vec[i] <= cc_in[i];
      avg_cc  <= CONG_W'(sum / SUM_W'(N_CORES));
      max_cc  <= mx;
      max_idx <= mi;
    end
  end

endmodule
