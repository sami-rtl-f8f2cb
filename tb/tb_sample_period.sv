// tb_sample_period: delivers random numbers of packets per cycle and checks that period_end
// pulses exactly in the cycle after the running packet total first reaches each multiple of
// the period, and never otherwise.
module tb_sample_period;
  localparam int P = 1000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] pkt_cnt = '0;
  logic period_end;
  int checks = 0, failures = 0;

  sample_period #(.PERIOD_PKTS(P), .CNT_IN_W(8)) dut (.clk, .rst_n, .pkt_cnt, .period_end);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint total;
    int periods, pulses;
    bit exp_pulse;
    total = 0; periods = 0; pulses = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 10000; t++) begin
      @(negedge clk);
      pkt_cnt = (t % 1000 < 500) ? 8'($urandom_range(0, 3)) : 8'($urandom_range(0, 200));
      total += pkt_cnt;
      exp_pulse = (total / P) > periods;
      if (exp_pulse) periods++;
      @(posedge clk);
      #1;
      checks++;
      if (period_end != exp_pulse) begin
        failures++;
        $display("cycle %0d: period_end=%0b expected %0b (total %0d)", t, period_end, exp_pulse, total);
      end
      if (period_end) pulses++;
    end
    checks++;
    if (pulses != int'(total / P)) begin
      failures++;
      $display("pulses %0d, expected %0d", pulses, total / P);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
