// tb_pid_controller: applies sequences of setpoints and measurements and checks every output
// against the discrete PID law computed in integers (gains 1.0, 0.25, 0.5 in Q4), including
// the integral clamp and the congested flag. Directed parts check that a sustained positive
// error drives the output up and that the output turns negative once the measurement falls well
// below the threshold.
module tb_pid_controller;
  import sami_pkg::*;
  localparam int KP = 16, KI = 4, KD = 8, IMAX = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic update = 1'b0;
  logic [15:0] setpoint = '0, measurement = '0;
  logic signed [PID_W-1:0] out;
  logic out_valid, congested;
  int checks = 0, failures = 0;

  pid_controller #(.IN_W(16), .KP(KP), .KI(KI), .KD(KD), .GAIN_FRAC(4), .INT_MAX(IMAX))
    dut (.clk, .rst_n, .update, .setpoint, .measurement, .out, .out_valid, .congested);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint m_int = 0, m_eprev = 0, m_out = 0;
  int positive = 0, negative = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic step(int sp, int ms);
    longint e, acc;
    @(negedge clk);
    setpoint = 16'(sp); measurement = 16'(ms); update = 1'b1;
    e = longint'(ms) - longint'(sp);
    m_int += e;
    if (m_int > IMAX) m_int = IMAX;
    if (m_int < -IMAX) m_int = -IMAX;
    acc = KP * e + KI * m_int + KD * (e - m_eprev);
    // arithmetic shift right by 4 rounds towards minus infinity
    m_out = (acc >= 0) ? acc / 16 : -((-acc + 15) / 16);
    m_eprev = e;
    @(negedge clk);
    update = 1'b0;
    check("out_valid", out_valid, 1);
    check("out", out, m_out);
    check("congested", congested, m_out > 0);
    if (out > 0) positive++; else if (out < 0) negative++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // sustained congestion: output grows as the integral builds up
    for (int i = 0; i < 10; i++) step(1000, 1200);
    check("integral raised output", out > 16'sd200 + 16'sd50, 1);
    // congestion removed
    for (int i = 0; i < 30; i++) step(1000, 400);
    check("output negative after relief", out < 0, 1);
    // long saturation of the integral
    for (int i = 0; i < 50; i++) step(0, 30000);
    for (int i = 0; i < 400; i++) step($urandom_range(0, 3000), $urandom_range(0, 3000));
    check("both signs seen", (positive > 0) && (negative > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
