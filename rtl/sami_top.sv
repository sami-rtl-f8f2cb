// sami_top: the self-aware congestion control platform of a 2D-mesh many-core chip.
//
// Data path of the control loop, all in the central manager except the per-router meters:
//   congestion_meter (one per router) -> manager_node (one per region) ->
//   core_congestion_meter (CC matrix) and region_congestion_meter (RC matrix);
//   traffic_predictor + sample_period -> threshold_calculator -> th_c, th_r;
//   error node + pid_controller, once for the core trigger and once for the region trigger;
//   task_migration_manager, which reads the CC/RC vectors and rewrites the task_mapping_table.
// The mesh is MESH_X x MESH_Y routers cut into REG_X x REG_Y equal regions; the default is the
// largest configuration the document evaluates, a 12 x 12 mesh with 9 regions.
//
// Sequence per sample period (period_end at cycle T): predictor state at T+1, prediction totals
// at T+2, thresholds at T+4, both PID outputs at T+5, which also starts the migration pass. A
// pass that is still running when the next one would start lets that one go by.
//
// The data network, the cores, the network between the Manager Nodes and the manager and the
// software that moves a task's state are outside this block: their signals are ports. Router
// links report packets on link_pkt (bit N_LINKS-1 is the local link, whose packets are the ones
// delivered to the core and counted for the sample period), network interfaces report the packets of each tracked
// task pair on flow_pkt, the mapping unit writes the table through map_*, and every migration
// leaves as mig_valid/mig_cmd.
module sami_top
  import sami_pkg::*;
#(
  parameter int unsigned MESH_X      = 12,
  parameter int unsigned MESH_Y      = 12,
  parameter int unsigned REG_X       = 3,
  parameter int unsigned REG_Y       = 3,
  parameter int unsigned N_LINKS     = 5,
  parameter int unsigned NUM_FLOWS   = 64,
  parameter int unsigned MAX_TASKS   = 256,
  parameter int unsigned PERIOD_PKTS = 15000,
  parameter int unsigned TH_C_MIN    = 128,
  parameter int unsigned TH_R_MIN    = 2048
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [N_LINKS-1:0]                    link_pkt [MESH_X*MESH_Y],
  input  logic [NUM_FLOWS-1:0]                  flow_pkt,
  input  logic                                  map_we,
  input  logic [$clog2(MAX_TASKS)-1:0]          map_idx,
  input  logic                                  map_valid,
  input  logic [$clog2(MESH_X*MESH_Y)-1:0]      map_core,
  input  logic [CONG_W-1:0]                     map_weight,
  output logic                                  mig_valid,
  output mig_cmd_t                              mig_cmd,
  output logic                                  mig_region,
  output logic                                  period_end,
  output logic [CONG_W-1:0]                     th_c,
  output logic [REG_W-1:0]                      th_r,
  output logic signed [PID_W-1:0]               pid_c_out,
  output logic signed [PID_W-1:0]               pid_r_out,
  output logic                                  pid_valid,
  output logic                                  tmm_busy,
  output logic                                  tmm_done,
  output logic [$clog2(MESH_X*MESH_Y)-1:0]      max_core,   // most congested core
  output logic [$clog2(REG_X*REG_Y)-1:0]        max_reg,    // most congested region
  output logic [15:0]                           flow_pred [NUM_FLOWS],
  output logic [NUM_FLOWS-1:0]                  pred_sel    // 1: long-term predictor in use
);
  localparam int unsigned N_CORES   = MESH_X * MESH_Y;
  localparam int unsigned N_REG     = REG_X * REG_Y;
  localparam int unsigned REG_CORES = N_CORES / N_REG;
  localparam int unsigned CNT_W     = 16;
  localparam int unsigned TOT_W     = CNT_W + $clog2(NUM_FLOWS);
  localparam int unsigned PC_W      = $clog2(N_CORES + 1);

  // ---- per-router meters and Manager Nodes ----
  logic [CONG_W-1:0] level   [N_CORES];
  logic [CONG_W-1:0] mn_in   [N_REG][REG_CORES];
  logic [CONG_W-1:0] mn_cc   [N_REG][REG_CORES];
  logic [REG_W-1:0]  mn_rc   [N_REG];
  logic [CONG_W-1:0] cc_in   [N_CORES];

  for (genvar c = 0; c < N_CORES; c++) begin : g_meter
    congestion_meter #(.N_LINKS(N_LINKS)) u_meter (
      .clk, .rst_n, .pkt(link_pkt[c]), .level(level[c])
    );
  end

  for (genvar r = 0; r < N_REG; r++) begin : g_mn
    for (genvar k = 0; k < REG_CORES; k++) begin : g_core
      localparam int unsigned C = region_core(r, k, MESH_X, MESH_Y, REG_X, REG_Y);
      assign mn_in[r][k] = level[C];
      assign cc_in[C]    = mn_cc[r][k];
    end
    manager_node #(.REG_CORES(REG_CORES)) u_mn (
      .clk, .rst_n, .core_level(mn_in[r]), .cc_out(mn_cc[r]), .rc_out(mn_rc[r])
    );
  end

  // ---- CCM and RCM ----
  logic [CONG_W-1:0]          cc_vec [N_CORES];
  logic [CONG_W-1:0]          avg_cc, max_cc;
  logic [REG_W-1:0]           rc_vec [N_REG];
  logic [REG_W-1:0]           avg_rc, max_rc;

  core_congestion_meter #(.N_CORES(N_CORES)) u_ccm (
    .clk, .rst_n, .cc_in, .cc_vec, .avg_cc, .max_cc, .max_idx(max_core)
  );
  region_congestion_meter #(.N_REGIONS(N_REG)) u_rcm (
    .clk, .rst_n, .rc_in(mn_rc), .rc_vec, .avg_rc, .max_rc, .max_idx(max_reg)
  );

  // ---- sample period and prediction ----
  logic [PC_W-1:0] pkt_cnt;
  // Packets delivered this cycle: pulses on the local (ejection) link of every router.
  always_comb begin
    pkt_cnt = '0;
    for (int c = 0; c < N_CORES; c++) pkt_cnt += PC_W'(link_pkt[c][N_LINKS-1]);
  end

  sample_period #(.PERIOD_PKTS(PERIOD_PKTS), .CNT_IN_W(PC_W)) u_period (
    .clk, .rst_n, .pkt_cnt, .period_end
  );

  logic [TOT_W-1:0]     pred_total, act_total;
  logic                 pred_valid;

  traffic_predictor #(.NUM_FLOWS(NUM_FLOWS), .CNT_W(CNT_W)) u_pred (
    .clk, .rst_n, .flow_pkt, .period_end, .pred(flow_pred), .sel(pred_sel),
    .pred_total, .act_total, .pred_valid
  );

  // ---- thresholds and controllers ----
  logic th_valid, pid_r_valid, cc_trig, rc_trig;

  threshold_calculator #(.TOT_W(TOT_W), .TH_C_MIN(TH_C_MIN), .TH_R_MIN(TH_R_MIN)) u_tc (
    .clk, .rst_n, .update(pred_valid), .avg_cc, .avg_rc, .pred_total, .act_total,
    .th_c, .th_r, .th_valid
  );

  pid_controller #(.IN_W(CONG_W)) u_pid_c (
    .clk, .rst_n, .update(th_valid), .setpoint(th_c), .measurement(max_cc),
    .out(pid_c_out), .out_valid(pid_valid), .congested(cc_trig)
  );
  pid_controller #(.IN_W(REG_W)) u_pid_r (
    .clk, .rst_n, .update(th_valid), .setpoint(th_r), .measurement(max_rc),
    .out(pid_r_out), .out_valid(pid_r_valid), .congested(rc_trig)
  );

  // ---- migration ----
  logic [$clog2(MAX_TASKS)-1:0] tt_rd_idx, tt_wr_idx;
  logic                         tt_rd_valid, tt_wr_en;
  logic [$clog2(N_CORES)-1:0]   tt_rd_core, tt_wr_core;
  logic [CONG_W-1:0]            tt_rd_weight;

  task_mapping_table #(.MAX_TASKS(MAX_TASKS), .N_CORES(N_CORES)) u_table (
    .clk, .rst_n,
    .map_we, .map_idx, .map_valid, .map_core, .map_weight,
    .mig_we(tt_wr_en), .mig_idx(tt_wr_idx), .mig_core(tt_wr_core),
    .rd_idx(tt_rd_idx), .rd_valid(tt_rd_valid), .rd_core(tt_rd_core), .rd_weight(tt_rd_weight)
  );

  task_migration_manager #(
    .MESH_X(MESH_X), .MESH_Y(MESH_Y), .REG_X(REG_X), .REG_Y(REG_Y), .MAX_TASKS(MAX_TASKS)
  ) u_tmm (
    .clk, .rst_n, .start(pid_valid && pid_r_valid), .cc_trig, .rc_trig, .th_c, .th_r,
    .cc_vec, .rc_vec,
    .tt_rd_idx, .tt_rd_valid, .tt_rd_core, .tt_rd_weight,
    .tt_wr_en, .tt_wr_idx, .tt_wr_core,
    .mig_valid, .mig_cmd, .mig_region, .busy(tmm_busy), .done(tmm_done)
  );

endmodule
