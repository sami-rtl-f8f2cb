// manager_node: the Manager Node (MN) of one region. Every cycle it samples the congestion level
// of each core of its region, forwards the samples towards the Core Congestion Meter and the sum
// of them, the region congestion, towards the Region Congestion Meter.
//
// One MN per region and its role of collecting the region's core information follow the
// document. The document carries these values over a dedicated circuit-switched network between
// the MNs and the central manager; here that transport is one register stage, so both outputs
// lag the inputs by one cycle.
module manager_node
  import sami_pkg::*;
#(
  parameter int unsigned REG_CORES = 16   // cores per region (4 x 4 in a 12 x 12 mesh, 9 regions)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CONG_W-1:0] core_level [REG_CORES],  // from the routers of the region
  output logic [CONG_W-1:0] cc_out     [REG_CORES],  // to the CCM
  output logic [REG_W-1:0]  rc_out                   // to the RCM
);
  logic [REG_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < REG_CORES; i++) sum += REG_W'(core_level[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < REG_CORES; i++) cc_out[i] <= '0;
      rc_out <= '0;
    end else begin
      for (int i = 0; i < REG_CORES; i++) cc_out[i] <= core_level[i];
      rc_out <= sum;
    end
  end

endmodule
