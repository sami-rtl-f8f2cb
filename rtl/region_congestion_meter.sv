// region_congestion_meter: the Region Congestion Meter (RCM). It receives the summed congestion
// of every region (the RC matrix) from the Manager Nodes and produces, registered once per cycle:
//   avg_rc  - the average region congestion, for the threshold calculator;
//   max_rc  - the RC measurement, the level of the most congested region, which the error node
//             compares with th_r;
//   max_idx - that region;
//   rc_vec  - the RC vector, a copy of all region levels, for the task migration manager.
// Averaging and sending the vector follow the document. Using the maximum region level as the
// measurement is this design's reading of the trigger "a region whose congestion exceeds th_r".
// Ties for the maximum go to the lowest region index.
module region_congestion_meter
  import sami_pkg::*;
#(
  parameter int unsigned N_REGIONS = 9
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [REG_W-1:0]             rc_in  [N_REGIONS],
  output logic [REG_W-1:0]             rc_vec [N_REGIONS],
  output logic [REG_W-1:0]             avg_rc,
  output logic [REG_W-1:0]             max_rc,
  output logic [$clog2(N_REGIONS)-1:0] max_idx
);
  localparam int unsigned SUM_W = REG_W + $clog2(N_REGIONS) + 1;

  logic [SUM_W-1:0]              sum;
  logic [REG_W-1:0]              mx;
  logic [$clog2(N_REGIONS)-1:0]  mi;

  always_comb begin
    sum = '0;
    mx  = '0;
    mi  = '0;
    for (int i = 0; i < N_REGIONS; i++) begin
      sum += SUM_W'(rc_in[i]);
      if (rc_in[i] > mx) begin
        mx = rc_in[i];
        mi = $clog2(N_REGIONS)'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_REGIONS; i++) rc_vec[i] <= '0;
      avg_rc  <= '0;
      max_rc  <= '0;
      max_idx <= '0;
    end else begin
      for (int i = 0; i < N_REGIONS; i++) rc_vec[i] <= rc_in[i];
      avg_rc  <= REG_W'(sum / SUM_W'(N_REGIONS));
      max_rc  <= mx;
      max_idx <= mi;
    end
  end

endmodule
