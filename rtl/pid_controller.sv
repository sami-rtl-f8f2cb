// pid_controller: the error node and PID controller of one trigger (core or region).
//
// At each update the error e = measurement - setpoint is formed (positive when the measured
// congestion is above the threshold) and the discrete form of
//   out = Kp*e + Ki*sum(e) + Kd*(e - e_prev)
// is evaluated, with gains in fixed point (value / 2^GAIN_FRAC). The controller output goes to
// the task migration manager, which treats out > 0 as "congested". The PID law follows the
// document; the sign convention, the one-step discretisation, the gains, the anti-windup clamp
// of the integral (+-INT_MAX) and the output saturation are this design's choices.
//
// Timing: update at cycle T registers e, the integral and out at the edge ending T; out and
// the one-cycle out_valid are visible from T+1.
module pid_controller
  import sami_pkg::*;
#(
  parameter int unsigned IN_W      = 16,
  parameter int          KP        = 16,     // 1.0
  parameter int          KI        = 4,      // 0.25
  parameter int          KD        = 8,      // 0.5
  parameter int unsigned GAIN_FRAC = 4,
  parameter int          INT_MAX   = 65535
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    update,
  input  logic [IN_W-1:0]         setpoint,     // threshold
  input  logic [IN_W-1:0]         measurement,  // CC or RC measurement
  output logic signed [PID_W-1:0] out,
  output logic                    out_valid,
  output logic                    congested     // out > 0
);
  localparam int unsigned W = 40;

  logic signed [W-1:0] e_prev, integ;

  logic signed [W-1:0] e, i_new, acc;

  always_comb begin
    e     = $signed(W'(measurement)) - $signed(W'(setpoint));
    i_new = integ + e;
    if (i_new > W'(INT_MAX))       i_new = W'(INT_MAX);
    else if (i_new < -W'(INT_MAX)) i_new = -W'(INT_MAX);
    acc   = (W'(KP) * e + W'(KI) * i_new + W'(KD) * (e - e_prev)) >>> GAIN_FRAC;
    if (acc > W'(2 ** (PID_W - 1) - 1))  acc = W'(2 ** (PID_W - 1) - 1);
    else if (acc < -W'(2 ** (PID_W - 1))) acc = -W'(2 ** (PID_W - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_prev    <= '0;
      integ     <= '0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= update;
      if (update) begin
        integ  <= i_new;
        e_prev <= e;
        out    <= PID_W'(acc);
      end
    end
  end

  assign congested = (out > 0);

endmodule
