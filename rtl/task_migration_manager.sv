// task_migration_manager: the Task Migration Manager (TMM). After each threshold update (start)
// it runs one pass of the migration algorithm on a snapshot of the CC vector (per-core
// congestion C) and the RC vector (per-region congestion R):
//
// Core phase, when the core PID reports congestion (cc_trig):
//   cs = most congested core, cd = least congested other core;
//   repeat while cs still has unexamined tasks and C(cs) > th_c:
//     take the heaviest unexamined task of cs (weight w);
//     if w + C(cd) <= th_c migrate it to cd, else drop it from consideration.
// Region phase, when the region PID reports congestion (rc_trig):
//   rs = most congested region, cd = least congested core outside rs;
//   repeat while rs has unexamined cores and R(rs) > th_r:
//     cs = most congested unexamined core of rs; for its tasks, heaviest first, while R(rs) > th_r:
//       migrate to cd if w + C(cd) <= th_c and w + R(region(cd)) <= th_r, else drop it.
// The congestion a task takes with it is estimated as its weight: a migration subtracts w from
// the source core and region and adds it to the destination core and region in the snapshot,
// so later decisions of the same pass see its effect.
//
// The algorithm, the heaviest-task-first order, the minimum-congestion destination, the
// outside-the-region rule and random choice among equally congested destinations follow the
// document. The loop conditions are read as "while tasks remain and the source is still above
// its threshold". The weight-as-congestion estimate, the PID sign test as trigger, the
// sequential table scan (one task per cycle) and the LFSR tie-break are this design's choices.
//
// Interface and timing: start is a one-cycle pulse while idle; the thresholds, triggers and
// vectors are sampled then. Each scan of the task table takes MAX_TASKS cycles through the
// combinational read port (tt_rd_*). Each migration is a one-cycle mig_valid pulse with
// mig_cmd, during which the table's core field is rewritten (tt_wr_*). done pulses for one
// cycle at the end of the pass; busy is high from the cycle after start until done. The fields
// of mig_cmd are 16 bits wide for any mesh size; above the core and task index widths they are
// zero.
module task_migration_manager
  import sami_pkg::*;
#(
  parameter int unsigned MESH_X    = 12,
  parameter int unsigned MESH_Y    = 12,
  parameter int unsigned REG_X     = 3,
  parameter int unsigned REG_Y     = 3,
  parameter int unsigned MAX_TASKS = 256
) (
  input  logic                                              clk,
  input  logic                                              rst_n,
  input  logic                                              start,
  input  logic                                              cc_trig,
  input  logic                                              rc_trig,
  input  logic [CONG_W-1:0]                                 th_c,
  input  logic [REG_W-1:0]                                  th_r,
  input  logic [CONG_W-1:0]                                 cc_vec [MESH_X*MESH_Y],
  input  logic [REG_W-1:0]                                  rc_vec [REG_X*REG_Y],
  // task mapping table
  output logic [$clog2(MAX_TASKS)-1:0]                      tt_rd_idx,
  input  logic                                              tt_rd_valid,
  input  logic [$clog2(MESH_X*MESH_Y)-1:0]                  tt_rd_core,
  input  logic [CONG_W-1:0]                                 tt_rd_weight,
  output logic                                              tt_wr_en,
  output logic [$clog2(MAX_TASKS)-1:0]                      tt_wr_idx,
  output logic [$clog2(MESH_X*MESH_Y)-1:0]                  tt_wr_core,
  // migration orders
  output logic                                              mig_valid,
  output mig_cmd_t                                          mig_cmd,
  output logic                                              mig_region,  // 1: region trigger
  output logic                                              busy,
  output logic                                              done
);
  localparam int unsigned N_CORES = MESH_X * MESH_Y;
  localparam int unsigned N_REG   = REG_X * REG_Y;
  localparam int unsigned CI_W    = $clog2(N_CORES);
  localparam int unsigned RI_W    = $clog2(N_REG);
  localparam int unsigned TI_W    = $clog2(MAX_TASKS);

  typedef enum logic [3:0] {
    S_IDLE, S_CC_SRC, S_CC_DST, S_CC_SCAN, S_CC_DECIDE,
    S_RC_SRC, S_RC_DST, S_RC_CORE, S_RC_SCAN, S_RC_DECIDE, S_DONE
  } state_t;

  state_t            state;
  logic [CONG_W-1:0] cl [N_CORES];     // snapshot of core congestion
  logic [REG_W-1:0]  rl [N_REG];       // snapshot of region congestion
  logic [CONG_W-1:0] thc_q;
  logic [REG_W-1:0]  thr_q;
  logic              rc_trig_q;
  logic [CI_W-1:0]   cs, cd;
  logic [RI_W-1:0]   rs;
  logic [TI_W-1:0]   scan_idx;
  logic              best_found;
  logic [TI_W-1:0]   best_task;
  logic [CONG_W-1:0] best_w;
  logic [MAX_TASKS-1:0] task_done;
  logic [N_CORES-1:0]   core_cand;
  logic [15:0]          lfsr;

  // Static region membership of every core.
  function automatic logic [RI_W-1:0] reg_of(int unsigned c);
    return RI_W'(region_of(c, MESH_X, MESH_Y, REG_X, REG_Y));
  endfunction

  // ---- combinational selections -------------------------------------------------------------
  logic [N_CORES-1:0] src_mask, dst_mask, in_rs;
  logic [CI_W-1:0]    src_pick, dst_pick;
  logic               src_any, dst_any;
  logic [RI_W-1:0]    reg_pick;
  logic [CI_W-1:0]    rnd_off;

  assign rnd_off = CI_W'(lfsr % 16'(N_CORES));

  always_comb begin
    for (int c = 0; c < N_CORES; c++) in_rs[c] = (reg_of(c) == rs);
  end

  always_comb begin
    src_mask = (state == S_CC_SRC) ? '1 : core_cand;
    dst_mask = '1;
    if (state == S_CC_DST) dst_mask[cs] = 1'b0;
    else                   dst_mask = ~in_rs;
  end

  // Most congested core in src_mask; ties to the lowest index.
  always_comb begin
    logic [CONG_W-1:0] best;
    src_any  = 1'b0;
    src_pick = '0;
    best     = '0;
    for (int c = 0; c < N_CORES; c++)
      if (src_mask[c] && (!src_any || cl[c] > best)) begin
        src_any  = 1'b1;
        src_pick = CI_W'(c);
        best     = cl[c];
      end
  end

  // Least congested core in dst_mask. Among equal minima the core whose distance (mod N_CORES)
  // from the pseudo-random index rnd_off is smallest wins, so ties are broken at random.
  always_comb begin
    logic [CONG_W-1:0] best;
    logic [CI_W-1:0]   best_rank, rank;
    dst_any   = 1'b0;
    dst_pick  = '0;
    best      = '0;
    best_rank = '0;
    for (int j = 0; j < N_CORES; j++) begin
      rank = (CI_W'(j) >= rnd_off) ? CI_W'(j) - rnd_off : CI_W'(j) + CI_W'(N_CORES) - rnd_off;
      if (dst_mask[j] && (!dst_any || cl[j] < best || (cl[j] == best && rank < best_rank))) begin
        dst_any   = 1'b1;
        dst_pick  = CI_W'(j);
        best      = cl[j];
        best_rank = rank;
      end
    end
  end

  // Most congested region; ties to the lowest index.
  always_comb begin
    logic [REG_W-1:0] best;
    reg_pick = '0;
    best     = rl[0];
    for (int r = 1; r < N_REG; r++)
      if (rl[r] > best) begin
        reg_pick = RI_W'(r);
        best     = rl[r];
      end
  end

  // ---- table scan -----------------------------------------------------------------------------
  logic scan_hit;
  assign tt_rd_idx = scan_idx;
  assign scan_hit  = tt_rd_valid && (tt_rd_core == cs) && !task_done[scan_idx]
                  && (!best_found || tt_rd_weight > best_w);

  // ---- migration decision -----------------------------------------------------------------------
  logic [RI_W-1:0] rg_s, rg_d;
  logic            fits_c, fits_r, do_mig;
  assign rg_s   = reg_of(int'(cs));
  assign rg_d   = reg_of(int'(cd));
  assign fits_c = ({1'b0, best_w} + {1'b0, cl[cd]}) <= {1'b0, thc_q};
  assign fits_r = (REG_W'(best_w) + {1'b0, rl[rg_d]}) <= {1'b0, thr_q};
  assign do_mig = (state == S_CC_DECIDE) ? fits_c
                : (state == S_RC_DECIDE) ? (fits_c && fits_r) : 1'b0;

  function automatic logic [CONG_W-1:0] sat_add_c(logic [CONG_W-1:0] a, logic [CONG_W-1:0] b);
    logic [CONG_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[CONG_W] ? '1 : s[CONG_W-1:0];
  endfunction
  function automatic logic [REG_W-1:0] sat_add_r(logic [REG_W-1:0] a, logic [REG_W-1:0] b);
    logic [REG_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[REG_W] ? '1 : s[REG_W-1:0];
  endfunction

  assign tt_wr_en   = do_mig;
  assign tt_wr_idx  = best_task;
  assign tt_wr_core = cd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      for (int c = 0; c < N_CORES; c++) cl[c] <= '0;
      for (int r = 0; r < N_REG; r++)   rl[r] <= '0;
      thc_q      <= '0;
      thr_q      <= '0;
      rc_trig_q  <= 1'b0;
      cs         <= '0;
      cd         <= '0;
      rs         <= '0;
      scan_idx   <= '0;
      best_found <= 1'b0;
      best_task  <= '0;
      best_w     <= '0;
      task_done  <= '0;
      core_cand  <= '0;
      lfsr       <= 16'hACE1;
      mig_valid  <= 1'b0;
      mig_cmd    <= '0;
      mig_region <= 1'b0;
      done       <= 1'b0;
    end else begin
      lfsr      <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      mig_valid <= 1'b0;
      done      <= 1'b0;

      unique case (state)
        S_IDLE: if (start) begin
          for (int c = 0; c < N_CORES; c++) cl[c] <= cc_vec[c];
          for (int r = 0; r < N_REG; r++)   rl[r] <= rc_vec[r];
          thc_q     <= th_c;
          thr_q     <= th_r;
          rc_trig_q <= rc_trig;
          state     <= cc_trig ? S_CC_SRC : S_RC_SRC;
        end

        // ---- core trigger ----
        S_CC_SRC: begin
          cs    <= src_pick;
          state <= S_CC_DST;
        end
        S_CC_DST: begin
          cd         <= dst_pick;
          task_done  <= '0;
          scan_idx   <= '0;
          best_found <= 1'b0;
          state      <= dst_any ? S_CC_SCAN : S_RC_SRC;
        end
        S_CC_SCAN: begin
          if (scan_hit) begin
            best_found <= 1'b1;
            best_task  <= scan_idx;
            best_w     <= tt_rd_weight;
          end
          scan_idx <= scan_idx + 1'b1;
          if (scan_idx == TI_W'(MAX_TASKS - 1)) begin
            if ((best_found || scan_hit) && cl[cs] > thc_q) state <= S_CC_DECIDE;
            else                                            state <= S_RC_SRC;
          end
        end
        S_CC_DECIDE: begin
          task_done[best_task] <= 1'b1;
          scan_idx   <= '0;
          best_found <= 1'b0;
          state      <= S_CC_SCAN;
        end

        // ---- region trigger ----
        S_RC_SRC: begin
          rs    <= reg_pick;
          state <= rc_trig_q ? S_RC_DST : S_DONE;
        end
        S_RC_DST: begin
          cd        <= dst_pick;
          core_cand <= in_rs;
          state     <= dst_any ? S_RC_CORE : S_DONE;
        end
        S_RC_CORE: begin
          if (rl[rs] <= thr_q || !src_any) state <= S_DONE;
          else begin
            cs         <= src_pick;
            task_done  <= '0;
            scan_idx   <= '0;
            best_found <= 1'b0;
            state      <= S_RC_SCAN;
          end
        end
        S_RC_SCAN: begin
          if (scan_hit) begin
            best_found <= 1'b1;
            best_task  <= scan_idx;
            best_w     <= tt_rd_weight;
          end
          scan_idx <= scan_idx + 1'b1;
          if (scan_idx == TI_W'(MAX_TASKS - 1)) begin
            if ((best_found || scan_hit) && rl[rs] > thr_q) state <= S_RC_DECIDE;
            else begin
              core_cand[cs] <= 1'b0;
              state         <= S_RC_CORE;
            end
          end
        end
        S_RC_DECIDE: begin
          task_done[best_task] <= 1'b1;
          scan_idx   <= '0;
          best_found <= 1'b0;
          state      <= S_RC_SCAN;
        end

        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase

      // A migration moves the task's weight from the source to the destination in the snapshot.
      if (do_mig) begin
        cl[cs]     <= (cl[cs] > best_w) ? cl[cs] - best_w : '0;
        cl[cd]     <= sat_add_c(cl[cd], best_w);
        if (rg_s != rg_d) begin
          rl[rg_s] <= (rl[rg_s] > REG_W'(best_w)) ? rl[rg_s] - REG_W'(best_w) : '0;
          rl[rg_d] <= sat_add_r(rl[rg_d], REG_W'(best_w));
        end
        mig_valid  <= 1'b1;
        mig_cmd    <= '{task_id: 16'(best_task), src_core: 16'(cs), dst_core: 16'(cd)};
        mig_region <= (state == S_RC_DECIDE);
      end
    end
  end

  assign busy = (state != S_IDLE);

  // Rules of the migration order interface.
  a_order_moves_task: assert property (@(posedge clk) disable iff (!rst_n)
    mig_valid |-> (mig_cmd.src_core != mig_cmd.dst_core));
  a_order_in_pass: assert property (@(posedge clk) disable iff (!rst_n)
    mig_valid |-> (busy || done));
  a_write_in_decide: assert property (@(posedge clk) disable iff (!rst_n)
    tt_wr_en |-> (state == S_CC_DECIDE || state == S_RC_DECIDE));
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    done |=> !done);

endmodule
