// tb_manager_node: feeds random core levels to one Manager Node and checks, one cycle later,
// that every level is forwarded unchanged and that the region output is their sum, including
// the largest sum (all cores at the maximum level).
module tb_manager_node;
  import sami_pkg::*;
  localparam int K = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CONG_W-1:0] core_level [K];
  logic [CONG_W-1:0] cc_out [K];
  logic [REG_W-1:0]  rc_out;
  int checks = 0, failures = 0;

  manager_node #(.REG_CORES(K)) dut (.clk, .rst_n, .core_level, .cc_out, .rc_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sum;
    int exp_lv [K];
    for (int i = 0; i < K; i++) core_level[i] = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (rc_out != 0) begin failures++; $display("reset sum %0d", rc_out); end
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      exp_sum = 0;
      for (int i = 0; i < K; i++) begin
        exp_lv[i] = (t == 499) ? 4095 : int'($urandom_range(0, 1280));
        core_level[i] = CONG_W'(exp_lv[i]);
        exp_sum += exp_lv[i];
      end
      @(posedge clk);
      #1;
      checks++;
      if (int'(rc_out) != exp_sum) begin
        failures++;
        $display("sum %0d expected %0d", rc_out, exp_sum);
      end
      for (int i = 0; i < K; i++) begin
        checks++;
        if (int'(cc_out[i]) != exp_lv[i]) begin
          failures++;
          $display("core %0d forwarded %0d expected %0d", i, cc_out[i], exp_lv[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
