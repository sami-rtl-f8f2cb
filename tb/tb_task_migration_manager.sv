// tb_task_migration_manager: the migration manager of a 12 x 12 mesh with 9 regions and a
// 256-entry task table. Each trial loads random tasks and weights, presents a CC and an RC
// vector (region values are the sums of their cores) and thresholds, starts one pass and
// records every migration order. A reference model written directly from the migration
// algorithm (core phase, then region phase, heaviest task first) predicts the list of orders;
// the recorded list must match it, and the table must hold the new cores afterwards. Core
// values are made distinct so the destination is unique. A last group of trials gives all
// destination candidates the same congestion: every order must then go to one of them, and
// more than one of them must be chosen over the trials.
module tb_task_migration_manager;
  import sami_pkg::*;
  localparam int MX = 12, MY = 12, RX = 3, RY = 3, T = 256;
  localparam int N = MX * MY, R = RX * RY;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, cc_trig = 1'b0, rc_trig = 1'b0;
  logic [CONG_W-1:0] th_c = '0;
  logic [REG_W-1:0]  th_r = '0;
  logic [CONG_W-1:0] cc_vec [N];
  logic [REG_W-1:0]  rc_vec [R];
  logic [7:0] tt_rd_idx, tt_wr_idx;
  logic tt_rd_valid, tt_wr_en;
  logic [7:0] tt_rd_core, tt_wr_core;
  logic [CONG_W-1:0] tt_rd_weight;
  logic mig_valid, mig_region, busy, done;
  mig_cmd_t mig_cmd;
  logic map_we = 1'b0, map_valid = 1'b0;
  logic [7:0] map_idx = '0, map_core = '0;
  logic [CONG_W-1:0] map_weight = '0;
  int checks = 0, failures = 0;

  task_mapping_table #(.MAX_TASKS(T), .N_CORES(N)) u_table (
    .clk, .rst_n, .map_we, .map_idx, .map_valid, .map_core, .map_weight,
    .mig_we(tt_wr_en), .mig_idx(tt_wr_idx), .mig_core(tt_wr_core),
    .rd_idx(tt_rd_idx), .rd_valid(tt_rd_valid), .rd_core(tt_rd_core), .rd_weight(tt_rd_weight));

  task_migration_manager #(.MESH_X(MX), .MESH_Y(MY), .REG_X(RX), .REG_Y(RY), .MAX_TASKS(T))
    dut (.clk, .rst_n, .start, .cc_trig, .rc_trig, .th_c, .th_r, .cc_vec, .rc_vec,
         .tt_rd_idx, .tt_rd_valid, .tt_rd_core, .tt_rd_weight, .tt_wr_en, .tt_wr_idx,
         .tt_wr_core, .mig_valid, .mig_cmd, .mig_region, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---- reference model ----
  int tv [T], tc [T], tw [T];     // task table
  int C [N], Rg [R];
  int exp_task [$], exp_src [$], exp_dst [$], exp_reg [$];
  int n_cc = 0, n_rc = 0, n_cc_skip = 0, n_rc_skip = 0;

  function automatic int reg_of(int c);
    return ((c / MX) / (MY / RY)) * RX + (c % MX) / (MX / RX);
  endfunction

  task automatic model(int thc, int thr, bit ctrig, bit rtrig);
    int cs, cd, rs, best, bw;
    bit done_t [T];
    bit cand [N];
    exp_task.delete(); exp_src.delete(); exp_dst.delete(); exp_reg.delete();
    if (ctrig) begin
      cs = 0;
      for (int c = 1; c < N; c++) if (C[c] > C[cs]) cs = c;
      cd = -1;
      for (int c = 0; c < N; c++) if (c != cs && (cd < 0 || C[c] < C[cd])) cd = c;
      foreach (done_t[t]) done_t[t] = 0;
      forever begin
        best = -1;
        for (int t = 0; t < T; t++)
          if (tv[t] != 0 && tc[t] == cs && !done_t[t] && (best < 0 || tw[t] > tw[best])) best = t;
        if (best < 0 || C[cs] <= thc) break;
        bw = tw[best];
        if (bw + C[cd] <= thc) begin
          exp_task.push_back(best); exp_src.push_back(cs); exp_dst.push_back(cd);
          exp_reg.push_back(0);
          C[cs] = (C[cs] > bw) ? C[cs] - bw : 0;
          C[cd] = C[cd] + bw;
          if (reg_of(cs) != reg_of(cd)) begin
            Rg[reg_of(cs)] = (Rg[reg_of(cs)] > bw) ? Rg[reg_of(cs)] - bw : 0;
            Rg[reg_of(cd)] += bw;
          end
          tc[best] = cd;
          n_cc++;
        end else n_cc_skip++;
        done_t[best] = 1;
      end
    end
    if (rtrig) begin
      rs = 0;
      for (int r = 1; r < R; r++) if (Rg[r] > Rg[rs]) rs = r;
      cd = -1;
      for (int c = 0; c < N; c++) if (reg_of(c) != rs && (cd < 0 || C[c] < C[cd])) cd = c;
      for (int c = 0; c < N; c++) cand[c] = (reg_of(c) == rs);
      forever begin
        bit any;
        if (Rg[rs] <= thr) break;
        cs = -1;
        for (int c = 0; c < N; c++) if (cand[c] && (cs < 0 || C[c] > C[cs])) cs = c;
        if (cs < 0) break;
        foreach (done_t[t]) done_t[t] = 0;
        forever begin
          best = -1;
          for (int t = 0; t < T; t++)
            if (tv[t] != 0 && tc[t] == cs && !done_t[t] && (best < 0 || tw[t] > tw[best]))
              best = t;
          if (best < 0 || Rg[rs] <= thr) break;
          bw = tw[best];
          if (bw + C[cd] <= thc && bw + Rg[reg_of(cd)] <= thr) begin
            exp_task.push_back(best); exp_src.push_back(cs); exp_dst.push_back(cd);
            exp_reg.push_back(1);
            C[cs] = (C[cs] > bw) ? C[cs] - bw : 0;
            C[cd] = C[cd] + bw;
            Rg[rs] = (Rg[rs] > bw) ? Rg[rs] - bw : 0;
            Rg[reg_of(cd)] += bw;
            tc[best] = cd;
            n_rc++;
          end else n_rc_skip++;
          done_t[best] = 1;
        end
        cand[cs] = 0;
        any = 0;
      end
    end
  endtask

  // ---- stimulus ----
  task automatic load_tasks(int ntasks, int wmax);
    for (int t = 0; t < T; t++) begin
      @(negedge clk);
      map_we = 1'b1; map_idx = 8'(t);
      tv[t] = (t < ntasks) ? 1 : 0;
      tc[t] = $urandom_range(0, N - 1);
      tw[t] = $urandom_range(1, wmax);
      map_valid = 1'(tv[t]); map_core = 8'(tc[t]); map_weight = CONG_W'(tw[t]);
    end
    @(negedge clk);
    map_we = 1'b0;
  endtask

  int got_task [$], got_src [$], got_dst [$], got_reg [$];
  always @(posedge clk) if (mig_valid) begin
    got_task.push_back(mig_cmd.task_id); got_src.push_back(mig_cmd.src_core);
    got_dst.push_back(mig_cmd.dst_core); got_reg.push_back(mig_region);
  end

  task automatic run_pass(int thc, int thr, bit ctrig, bit rtrig);
    got_task.delete(); got_src.delete(); got_dst.delete(); got_reg.delete();
    @(negedge clk);
    for (int c = 0; c < N; c++) cc_vec[c] = CONG_W'(C[c]);
    for (int r = 0; r < R; r++) rc_vec[r] = REG_W'(Rg[r]);
    th_c = CONG_W'(thc); th_r = REG_W'(thr); cc_trig = ctrig; rc_trig = rtrig;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check("busy", int'(busy), 1);
    wait (done);
    @(negedge clk);
    check("idle after done", int'(busy), 0);
  endtask

  initial begin
    int thc, thr;
    bit ct, rt;
    int dst_seen [int];
    for (int c = 0; c < N; c++) cc_vec[c] = '0;
    for (int r = 0; r < R; r++) rc_vec[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 40; trial++) begin
      load_tasks($urandom_range(100, 250), (trial % 2 == 0) ? 400 : 1500);
      for (int r = 0; r < R; r++) Rg[r] = 0;
      for (int c = 0; c < N; c++) begin
        C[c] = int'($urandom_range(0, 10)) * N + c;       // distinct values
        if (reg_of(c) == trial % R) C[c] += 1000;           // one hot region
        if (C[c] > 4095) C[c] = 4095 - c;
        Rg[reg_of(c)] += C[c];
      end
      thc = $urandom_range(700, 2200);
      thr = $urandom_range(12000, 30000);
      ct = (trial % 4 != 3);
      rt = (trial % 4 != 2);
      run_pass(thc, thr, ct, rt);
      model(thc, thr, ct, rt);
      check("number of migrations", got_task.size(), exp_task.size());
      for (int i = 0; i < exp_task.size() && i < got_task.size(); i++) begin
        check("task", got_task[i], exp_task[i]);
        check("src", got_src[i], exp_src[i]);
        check("dst", got_dst[i], exp_dst[i]);
        check("trigger", got_reg[i], exp_reg[i]);
      end
      // the table now holds the new cores
      for (int t = 0; t < T; t++) begin
        if (tv[t] != 0) check("table core", int'(u_table.core_q[t]), tc[t]);
      end
    end
    // equal destinations: random choice among them
    for (int trial = 0; trial < 12; trial++) begin
      load_tasks(60, 50);
      for (int c = 0; c < N; c++) C[c] = 100;
      C[5] = 3000;
      for (int r = 0; r < R; r++) Rg[r] = 0;
      for (int c = 0; c < N; c++) Rg[reg_of(c)] += C[c];
      repeat ($urandom_range(1, 40)) @(negedge clk);
      run_pass(2000, 60000, 1'b1, 1'b0);
      for (int i = 0; i < got_dst.size(); i++) begin
        check("tie dst is a minimum", int'(got_dst[i] != 5), 1);
        dst_seen[got_dst[i]] = 1;
      end
    end
    check("random tie-break spreads destinations", int'(dst_seen.num() > 1), 1);
    check("core-trigger migrations happened", int'(n_cc > 0), 1);
    check("region-trigger migrations happened", int'(n_rc > 0), 1);
    check("rejected candidates happened", int'(n_cc_skip > 0 && n_rc_skip > 0), 1);
    $display("migrations: core %0d (rejected %0d), region %0d (rejected %0d)",
             n_cc, n_cc_skip, n_rc, n_rc_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
