// task_mapping_table: the task mapping table of the central manager. Entry t holds whether task
// t is mapped, the core it runs on and its weight, the communication demand the migration
// manager uses to rank the tasks of a core. Remapping a task is nothing more than rewriting its
// core field; the task's state is then moved by the message-passing layer.
//
// Two write ports: the mapping port (the dynamic mapping unit places or removes a task and sets
// its weight) and the migration port (the task migration manager changes only the core). When
// both write the same entry in one cycle the migration port's core wins. One combinational read
// port serves the migration manager's scans. Remapping through a table follows the document;
// the entry format and the ports are this design's choices. Writes take effect at the edge.
module task_mapping_table
  import sami_pkg::*;
#(
  parameter int unsigned MAX_TASKS = 256,
  parameter int unsigned N_CORES   = 144
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // mapping port
  input  logic                          map_we,
  input  logic [$clog2(MAX_TASKS)-1:0]  map_idx,
  input  logic                          map_valid,
  input  logic [$clog2(N_CORES)-1:0]    map_core,
  input  logic [CONG_W-1:0]             map_weight,
  // migration port
  input  logic                          mig_we,
  input  logic [$clog2(MAX_TASKS)-1:0]  mig_idx,
  input  logic [$clog2(N_CORES)-1:0]    mig_core,
  // read port
  input  logic [$clog2(MAX_TASKS)-1:0]  rd_idx,
  output logic                          rd_valid,
  output logic [$clog2(N_CORES)-1:0]    rd_core,
  output logic [CONG_W-1:0]             rd_weight
);
  logic                        valid_q  [MAX_TASKS];
  logic [$clog2(N_CORES)-1:0]  core_q   [MAX_TASKS];
  logic [CONG_W-1:0]           weight_q [MAX_TASKS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < MAX_TASKS; t++) begin
        valid_q[t]  <= 1'b0;
        core_q[t]   <= '0;
        weight_q[t] <= '0;
      end
    end else begin
      if (map_we) begin
        valid_q[map_idx]  <= map_valid;
        core_q[map_idx]   <= map_core;
        weight_q[map_idx] <= map_weight;
      end
      if (mig_we) core_q[mig_idx] <= mig_core;
    end
  end

  assign rd_valid  = valid_q[rd_idx];
  assign rd_core   = core_q[rd_idx];
  assign rd_weight = weight_q[rd_idx];

endmodule
