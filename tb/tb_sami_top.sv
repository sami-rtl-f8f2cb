// tb_sami_top: end-to-end run of the congestion control platform at its default size (12 x 12
// mesh, 9 regions, 64 flows, 256 tasks, 15000-packet sample period), for 40 sample periods.
//
// The testbench closes the loop the way the chip would: every task has a weight, each core's
// links carry packets at a rate proportional to the summed weight of the tasks mapped on it
// (weight / 1280 per link and cycle, so a core's measured level settles near that sum), and a
// migration order moves the task, and with it its traffic, to the destination core. Core HOT
// (ten tasks) and region 4 (three tasks per core) start overloaded. The sample period is
// counted in packets delivered to the cores. The predictor tracks 64 task-pair flows; half of
// them alternate between a low and a high rate from period to period, so the long-term
// predictor has a pattern to learn and the predicted traffic change moves the thresholds.
//
// Checked: every order names the task's current core as source, a different destination, and
// a destination outside the source region for region-triggered orders; the table holds the new
// core afterwards; thresholds never fall below their bounds; the number of sample periods
// equals the packets sent divided by the period; the overloaded core ends well below its
// starting level. Each mechanism (period end, long-term prediction chosen, threshold at the
// bound and above it, core and region congestion reported by the PIDs, core- and
// region-triggered migration, a rejected candidate) is counted and must occur.
module tb_sami_top;
  import sami_pkg::*;
  localparam int N = 144, R = 9, F = 64, T = 256, PERIOD = 15000, HOT = 50;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] link_pkt [N];
  logic [F-1:0] flow_pkt = '0;
  logic map_we = 1'b0, map_valid = 1'b0;
  logic [7:0] map_idx = '0, map_core = '0;
  logic [CONG_W-1:0] map_weight = '0;
  logic mig_valid, mig_region, period_end, pid_valid, tmm_busy, tmm_done;
  mig_cmd_t mig_cmd;
  logic [CONG_W-1:0] th_c;
  logic [REG_W-1:0] th_r;
  logic signed [PID_W-1:0] pid_c_out, pid_r_out;
  logic [7:0] max_core;
  logic [3:0] max_reg;
  logic [15:0] flow_pred [F];
  logic [F-1:0] pred_sel;
  int checks = 0, failures = 0;

  sami_top dut (
    .clk, .rst_n, .link_pkt, .flow_pkt, .map_we, .map_idx, .map_valid, .map_core, .map_weight,
    .mig_valid, .mig_cmd, .mig_region, .period_end, .th_c, .th_r, .pid_c_out, .pid_r_out,
    .pid_valid, .tmm_busy, .tmm_done, .max_core, .max_reg, .flow_pred, .pred_sel);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  function automatic int reg_of(int c);
    return ((c / 12) / 4) * 3 + (c % 12) / 4;
  endfunction

  // ---- task set and load model ----
  int tv [T], tcore [T], tw [T];
  int load [N];

  function automatic void recompute_load();
    for (int c = 0; c < N; c++) load[c] = 0;
    for (int t = 0; t < T; t++) if (tv[t] != 0) load[tcore[t]] += tw[t];
  endfunction

  // ---- mechanism counters ----
  int n_period = 0, n_longterm = 0, n_th_bound = 0, n_th_adapt = 0;
  int n_pid_c = 0, n_pid_r = 0, n_mig_cc = 0, n_mig_rc = 0, n_reject = 0, n_pass = 0;
  longint sent = 0;
  bit traffic_on = 1'b0;
  int period_idx = 0;

  always @(posedge clk) if (rst_n) begin
    if (period_end) begin n_period++; period_idx++; end
    if (pid_valid) begin
      if (pid_c_out > 0) n_pid_c++;
      if (pid_r_out > 0) n_pid_r++;
      if (th_c == CONG_W'(128)) n_th_bound++; else n_th_adapt++;
      if (pred_sel != '0) n_longterm++;
      checks++;
      if (th_c < CONG_W'(128) || th_r < REG_W'(2048)) begin
        failures++;
        $display("threshold below its bound: %0d %0d", th_c, th_r);
      end
    end
    if (tmm_done) n_pass++;
    if ((dut.u_tmm.state == dut.u_tmm.S_CC_DECIDE || dut.u_tmm.state == dut.u_tmm.S_RC_DECIDE)
        && !dut.u_tmm.do_mig) n_reject++;
  end

  // migration orders: check and apply
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

  // traffic generation
  always @(negedge clk) if (traffic_on) begin
    for (int c = 0; c < N; c++)
      for (int l = 0; l < 5; l++)
        link_pkt[c][l] = ($urandom_range(0, 1279) < load[c]);
    for (int c = 0; c < N; c++) sent += link_pkt[c][4];
    for (int f = 0; f < F; f++) begin
      int rate;
      rate = (f % 2 == 0) ? ((period_idx % 2 == 0) ? 4 : 12) : 8;   // percent per cycle
      flow_pkt[f] = ($urandom_range(0, 99) < rate);
    end
  end else begin
    for (int c = 0; c < N; c++) link_pkt[c] = '0;
    flow_pkt = '0;
  end

  initial begin
    int hot_before, hot_after;
    for (int c = 0; c < N; c++) link_pkt[c] = '0;
    // one light task per core; cores of region 4 carry two more tasks each and core HOT ten
    for (int t = 0; t < T; t++) begin
      tv[t] = 0; tcore[t] = 0; tw[t] = 0;
    end
    for (int c = 0; c < N; c++) begin
      tv[c] = 1; tcore[c] = c;
      tw[c] = (reg_of(c) == 4) ? 70 : int'($urandom_range(30, 90));
    end
    begin
      int t = N;
      for (int c = 0; c < N; c++)
        if (reg_of(c) == 4)
          for (int k = 0; k < 2; k++) begin
            tv[t] = 1; tcore[t] = c; tw[t] = 70; t++;
          end
      for (int k = 0; k < 10; k++) begin
        tv[t] = 1; tcore[t] = HOT; tw[t] = 60; t++;
      end
    end
    recompute_load();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < T; t++) begin
      @(negedge clk);
      map_we = 1'b1; map_idx = 8'(t); map_valid = 1'(tv[t]); map_core = 8'(tcore[t]);
      map_weight = CONG_W'(tw[t]);
    end
    @(negedge clk);
    map_we = 1'b0;
    traffic_on = 1'b1;
    repeat (200) @(negedge clk);
    hot_before = int'(dut.level[HOT]);
    wait (n_period == 40);
    repeat (100) @(negedge clk);
    hot_after = int'(dut.level[HOT]);
    traffic_on = 1'b0;
    repeat (20) @(negedge clk);
    check("sample periods", n_period, int'(sent / PERIOD));
    $display("hot core level %0d -> %0d; periods %0d, passes %0d", hot_before, hot_after,
             n_period, n_pass);
    $display("pid core>0 %0d, region>0 %0d; th at bound %0d, adapted %0d; long-term %0d",
             n_pid_c, n_pid_r, n_th_bound, n_th_adapt, n_longterm);
    $display("migrations core %0d, region %0d, rejected %0d", n_mig_cc, n_mig_rc, n_reject);
    check("hot core relieved", int'(hot_after < hot_before / 2), 1);
    check("mechanism: period end", int'(n_period > 0), 1);
    check("mechanism: long-term prediction chosen", int'(n_longterm > 0), 1);
    check("mechanism: threshold at lower bound", int'(n_th_bound > 0), 1);
    check("mechanism: threshold adapted", int'(n_th_adapt > 0), 1);
    check("mechanism: core congestion reported", int'(n_pid_c > 0), 1);
    check("mechanism: region congestion reported", int'(n_pid_r > 0), 1);
    check("mechanism: core-triggered migration", int'(n_mig_cc > 0), 1);
    check("mechanism: region-triggered migration", int'(n_mig_rc > 0), 1);
    check("mechanism: rejected candidate", int'(n_reject > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
