// tb_core_congestion_meter: random CC matrices for a 144-core mesh; checks one cycle later the
// average (integer mean), the maximum, the index of the first core holding it and the
// forwarded CC vector.
module tb_core_congestion_meter;
  import sami_pkg::*;
  localparam int N = 144;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CONG_W-1:0] cc_in [N];
  logic [CONG_W-1:0] cc_vec [N];
  logic [CONG_W-1:0] avg_cc, max_cc;
  logic [$clog2(N)-1:0] max_idx;
  int checks = 0, failures = 0;

  core_congestion_meter #(.N_CORES(N)) dut (.clk, .rst_n, .cc_in, .cc_vec, .avg_cc, .max_cc,
                                            .max_idx);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  initial begin
    int v [N];
    int sum, mx, mi;
    for (int i = 0; i < N; i++) cc_in[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      sum = 0; mx = -1; mi = 0;
      for (int i = 0; i < N; i++) begin
        // a few rounds with many equal values to exercise tie-breaking
        v[i] = (t % 4 == 0) ? int'($urandom_range(0, 3)) * 100 : int'($urandom_range(0, 4095));
        cc_in[i] = CONG_W'(v[i]);
        sum += v[i];
        if (v[i] > mx) begin mx = v[i]; mi = i; end
      end
      @(posedge clk);
      #1;
      check("avg", int'(avg_cc), sum / N);
      check("max", int'(max_cc), mx);
      check("max_idx", int'(max_idx), mi);
      for (int i = 0; i < N; i++) check("vec", int'(cc_vec[i]), v[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
