// sami_setup_run: closed-loop driver and checker for one sami_top instance of any mesh size,
// used by tb_sami_setups. Every task loads its core's links in proportion to its weight; one
// core carries ten extra tasks and the last region three tasks per core. It runs until PERIODS
// sample periods have ended, checks every migration order (source is the task's current core,
// destination differs, region orders leave the region, the table is updated) and reports its
// counts on the output ports. Traffic on tracked flows alternates per period.
module sami_setup_run
  import sami_pkg::*;
#(
  parameter int MX = 10,
  parameter int MY = 10,
  parameter int RX = 2,
  parameter int RY = 2,
  parameter int PERIODS = 32
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_mig_cc,
  output int   n_mig_rc,
  output int   hot_before,
  output int   hot_after
);
  localparam int N = MX * MY, R = RX * RY, F = 64, T = 256, HOT = 1;
  localparam int CW = $clog2(N), RW = $clog2(R);

  logic [4:0] link_pkt [N];
  logic [F-1:0] flow_pkt;
  logic map_we, map_valid;
  logic [7:0] map_idx;
  logic [CW-1:0] map_core;
  logic [CONG_W-1:0] map_weight;
  logic mig_valid, mig_region, period_end, pid_valid, tmm_busy, tmm_done;
  mig_cmd_t mig_cmd;
  logic [CONG_W-1:0] th_c;
  logic [REG_W-1:0] th_r;
  logic signed [PID_W-1:0] pid_c_out, pid_r_out;
  logic [CW-1:0] max_core;
  logic [RW-1:0] max_reg;
  logic [15:0] flow_pred [F];
  logic [F-1:0] pred_sel;

  sami_top #(.MESH_X(MX), .MESH_Y(MY), .REG_X(RX), .REG_Y(RY)) dut (
    .clk, .rst_n, .link_pkt, .flow_pkt, .map_we, .map_idx, .map_valid, .map_core, .map_weight,
    .mig_valid, .mig_cmd, .mig_region, .period_end, .th_c, .th_r, .pid_c_out, .pid_r_out,
    .pid_valid, .tmm_busy, .tmm_done, .max_core, .max_reg, .flow_pred, .pred_sel);

  function automatic int reg_of(int c);
    return ((c / MX) / (MY / RY)) * RX + (c % MX) / (MX / RX);
  endfunction

  int tv [T], tcore [T], tw [T];
  int load [N];
  int n_period, period_idx;
  bit traffic_on;

  function automatic void recompute_load();
    for (int c = 0; c < N; c++) load[c] = 0;
    for (int t = 0; t < T; t++) if (tv[t] != 0) load[tcore[t]] += tw[t];
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0dx%0d %s: got %0d expected %0d", MX, MY, what, got, exp);
    end
  endtask

  always @(posedge clk) if (rst_n && period_end) begin n_period++; period_idx++; end

  always @(posedge clk) if (rst_n && mig_valid) begin
    int t, s, d;
    t = mig_cmd.task_id; s = mig_cmd.src_core; d = mig_cmd.dst_core;
    check("order names a mapped task", tv[t], 1);
    check("source is the task's core", s, tcore[t]);
    check("destination differs", int'(d != s), 1);
    if (mig_region) begin
      n_mig_rc++;
      check("region order leaves the region", int'(reg_of(d) != reg_of(s)), 1);
    end else n_mig_cc++;
    tcore[t] = d;
    recompute_load();
    #1;
    check("table updated", int'(dut.u_table.core_q[t]), d);
  end

  always @(negedge clk) if (traffic_on) begin
    for (int c = 0; c < N; c++)
      for (int l = 0; l < 5; l++)
        link_pkt[c][l] = ($urandom_range(0, 1279) < load[c]);
    for (int f = 0; f < F; f++)
      flow_pkt[f] = ($urandom_range(0, 99) < ((f % 2 == 0) ? ((period_idx % 2 == 0) ? 4 : 12) : 8));
  end else begin
    for (int c = 0; c < N; c++) link_pkt[c] = '0;
    flow_pkt = '0;
  end

  initial begin
    int t;
    finished = 1'b0; checks = 0; failures = 0; n_mig_cc = 0; n_mig_rc = 0;
    n_period = 0; period_idx = 0; traffic_on = 1'b0;
    map_we = 1'b0; map_valid = 1'b0; map_idx = '0; map_core = '0; map_weight = '0;
    for (int i = 0; i < T; i++) begin tv[i] = 0; tcore[i] = 0; tw[i] = 0; end
    for (int c = 0; c < N; c++) begin
      tv[c] = 1; tcore[c] = c;
      tw[c] = (reg_of(c) == R - 1) ? 70 : int'($urandom_range(30, 90));
    end
    t = N;
    for (int c = 0; c < N; c++)
      if (reg_of(c) == R - 1)
        for (int k = 0; k < 2; k++) begin tv[t] = 1; tcore[t] = c; tw[t] = 70; t++; end
    for (int k = 0; k < 10; k++) begin tv[t] = 1; tcore[t] = HOT; tw[t] = 60; t++; end
    recompute_load();
    @(posedge rst_n);
    for (int i = 0; i < T; i++) begin
      @(negedge clk);
      map_we = 1'b1; map_idx = 8'(i); map_valid = 1'(tv[i]); map_core = CW'(tcore[i]);
      map_weight = CONG_W'(tw[i]);
    end
    @(negedge clk);
    map_we = 1'b0;
    traffic_on = 1'b1;
    repeat (200) @(negedge clk);
    hot_before = int'(dut.level[HOT]);
    wait (n_period == PERIODS);
    repeat (100) @(negedge clk);
    hot_after = int'(dut.level[HOT]);
    traffic_on = 1'b0;
    check("hot core relieved", int'(hot_after < hot_before / 2), 1);
    check("core-triggered migration", int'(n_mig_cc > 0), 1);
    check("region-triggered migration", int'(n_mig_rc > 0), 1);
    finished = 1'b1;
  end
endmodule
