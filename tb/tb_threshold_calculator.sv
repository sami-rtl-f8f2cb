// tb_threshold_calculator: random averages and traffic totals, plus the corner cases (no
// traffic last period, growth beyond the limit, averages below the lower bounds, saturation).
// After each update pulse it checks that th_valid comes exactly two cycles later and that both
// thresholds equal max(bound, p + p/4) with p = avg * clamp(pred/act) in Q8 arithmetic.
module tb_threshold_calculator;
  import sami_pkg::*;
  localparam int TW = 22;

  logic clk = 1'b0, rst_n = 1'b0;
  logic update = 1'b0;
  logic [CONG_W-1:0] avg_cc = '0;
  logic [REG_W-1:0]  avg_rc = '0;
  logic [TW-1:0] pred_total = '0, act_total = '0;
  logic [CONG_W-1:0] th_c;
  logic [REG_W-1:0]  th_r;
  logic th_valid;
  int checks = 0, failures = 0;

  threshold_calculator #(.TOT_W(TW), .TH_C_MIN(128), .TH_R_MIN(2048), .MARGIN_SHIFT(2),
                         .G_MAX_Q8(1024))
    dut (.clk, .rst_n, .update, .avg_cc, .avg_rc, .pred_total, .act_total, .th_c, .th_r,
         .th_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint expect_th(longint avg, longint pr, longint ac, longint lo,
                                       longint hi);
    longint g, p, t;
    g = (ac == 0) ? 256 : (pr * 256) / ac;
    if (g > 1024) g = 1024;
    p = (avg * g) / 256;
    t = p + p / 4;
    if (t < lo) t = lo;
    if (t > hi) t = hi;
    return t;
  endfunction

  task automatic run(int ac, int ar, int pr, int at);
    @(negedge clk);
    avg_cc = CONG_W'(ac); avg_rc = REG_W'(ar); pred_total = TW'(pr); act_total = TW'(at);
    update = 1'b1;
    @(negedge clk);
    update = 1'b0;
    avg_cc = '0; avg_rc = '0; pred_total = '0; act_total = '0;   // inputs only needed at update
    check("th_valid early", th_valid, 0);
    @(negedge clk);
    check("th_valid", th_valid, 1);
    check("th_c", th_c, expect_th(ac, pr, at, 128, 4095));
    check("th_r", th_r, expect_th(ar, pr, at, 2048, 65535));
    @(negedge clk);
    check("th_valid pulse", th_valid, 0);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check("reset th_c", th_c, 128);
    check("reset th_r", th_r, 2048);
    rst_n = 1'b1;
    run(400, 6000, 1000, 0);          // no traffic last period: g = 1
    run(400, 6000, 100000, 1000);     // growth clamped to 4
    run(50, 500, 1000, 1000);         // below both lower bounds
    run(4000, 65000, 4000, 1000);     // saturates both
    run(800, 12000, 500, 1000);       // traffic halves
    for (int i = 0; i < 500; i++)
      run($urandom_range(0, 1500), $urandom_range(0, 24000), $urandom_range(0, 30000),
          $urandom_range(0, 30000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
