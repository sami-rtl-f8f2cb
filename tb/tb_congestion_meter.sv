// tb_congestion_meter: drives random packet pulses on every link of one router meter and
// compares its level each cycle with a reference moving average kept in integers. It also
// checks the settled values: a link busy every cycle measures exactly one packet per cycle
// (256), an idle link decays to zero.
module tb_congestion_meter;
  import sami_pkg::*;
  localparam int N = 5;
  localparam int ALPHA = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] pkt = '0;
  logic [CONG_W-1:0] level;
  int checks = 0, failures = 0;
  int acc [N];

  congestion_meter #(.N_LINKS(N), .ALPHA(ALPHA)) dut (.clk, .rst_n, .pkt, .level);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_level();
    int s = 0;
    for (int i = 0; i < N; i++) s += acc[i] / (1 << ALPHA);
    return s;
  endfunction

  task automatic step(logic [N-1:0] p);
    @(negedge clk);
    pkt = p;
    @(posedge clk);
    for (int i = 0; i < N; i++) acc[i] = acc[i] - acc[i] / (1 << ALPHA) + (p[i] ? 256 : 0);
    #1;
    checks++;
    if (int'(level) != model_level()) begin
      failures++;
      $display("mismatch: level=%0d expected=%0d", level, model_level());
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) acc[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // random traffic, each link with its own load
    for (int c = 0; c < 3000; c++) begin
      logic [N-1:0] p;
      for (int i = 0; i < N; i++) p[i] = ($urandom_range(0, 99) < 20 * i);
      step(p);
    end
    // saturate: every link carries a packet every cycle
    for (int c = 0; c < 400; c++) step('1);
    checks++;
    if (level != CONG_W'(N * 256)) begin
      failures++;
      $display("saturated level %0d, expected %0d", level, N * 256);
    end
    // only link 2 busy: others decay away
    for (int c = 0; c < 600; c++) step(N'(1 << 2));
    checks++;
    if (level != CONG_W'(256)) begin
      failures++;
      $display("single-link level %0d, expected 256", level);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
