// tb_task_mapping_table: random mapping writes, migration writes and reads against an array
// model; checks read-back after every cycle and that a migration write on the same entry as a
// mapping write keeps the migration's core and the mapping's valid bit and weight.
module tb_task_mapping_table;
  import sami_pkg::*;
  localparam int T = 256, N = 144;

  logic clk = 1'b0, rst_n = 1'b0;
  logic map_we = 1'b0, map_valid = 1'b0, mig_we = 1'b0;
  logic [7:0] map_idx = '0, mig_idx = '0, rd_idx = '0;
  logic [7:0] map_core = '0, mig_core = '0, rd_core;
  logic [CONG_W-1:0] map_weight = '0, rd_weight;
  logic rd_valid;
  int checks = 0, failures = 0;

  task_mapping_table #(.MAX_TASKS(T), .N_CORES(N)) dut (
    .clk, .rst_n, .map_we, .map_idx, .map_valid, .map_core, .map_weight,
    .mig_we, .mig_idx, .mig_core, .rd_idx, .rd_valid, .rd_core, .rd_weight);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mv [T], mc [T], mw [T];

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < T; t++) begin mv[t] = 0; mc[t] = 0; mw[t] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      map_we = ($urandom_range(0, 1) == 1);
      map_idx = 8'($urandom_range(0, T - 1));
      map_valid = ($urandom_range(0, 3) != 0);
      map_core = 8'($urandom_range(0, N - 1));
      map_weight = CONG_W'($urandom_range(0, 4095));
      mig_we = ($urandom_range(0, 2) == 0);
      mig_idx = (i % 7 == 0) ? map_idx : 8'($urandom_range(0, T - 1));
      mig_core = 8'($urandom_range(0, N - 1));
      if (map_we) begin
        mv[map_idx] = map_valid; mc[map_idx] = map_core; mw[map_idx] = map_weight;
      end
      if (mig_we) mc[mig_idx] = mig_core;
      @(negedge clk);
      map_we = 1'b0; mig_we = 1'b0;
      rd_idx = (i % 2 == 0) ? map_idx : mig_idx;
      #1;
      check("valid", int'(rd_valid), mv[rd_idx]);
      check("core", int'(rd_core), mc[rd_idx]);
      check("weight", int'(rd_weight), mw[rd_idx]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
