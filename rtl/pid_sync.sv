// pid_sync: PID controller that synchronizes the slave oscillator to the
// master.
//
// Inputs are the master and slave x and y states.  With e1 = xm - xs and
// e2 = ym - ys the controller computes, per sample,
//   I[n]   = I[n-1] + T*e1[n]                      (integral register)
//   ctrl   = (Kp*T)*e1[n] + (Ki*T)*I[n] + (Kd*T)*e2[n]
// and ctrl is added to the slave's x update.  All gains are pre-multiplied by
// the step T = 1e-3 because the slave applies ctrl directly to its state
// (x[n+1] = ... + T*c[n]).  The gains Kp = 7.79 and Ki = 416.21 are the
// published values; Kd is quoted there as 529.3, while the controller diagram's
// Kd*T constant is 0.52933, so Kd = 529.33 is used; the integral follows its discrete PID equation
// (I[n-1] + e*dt).  The derivative branch acts on the y error, as in the
// controller's block diagram, where the Kd*T constant multiplies the y
// states; a literal (e1[n]-e1[n-1])/T derivative with a gain of this size makes the
// Euler loop diverge.  ctrl is combinational from the inputs and the
// integral register; the integral advances on each enabled clock.  Reset
// clears the integral.
module pid_sync
  import hc_pkg::*;
#(
  parameter real KP = 7.79,
  parameter real KI = 416.21,
  parameter real KD = 529.33,
  parameter real T  = 0.001
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  fix_t xm,
  input  fix_t xs,
  input  fix_t ym,
  input  fix_t ys,
  output fix_t ctrl,
  output fix_t err_x
);

  localparam fix_t K_PT = to_fix(KP * T);
  localparam fix_t K_IT = to_fix(KI * T);
  localparam fix_t K_DT = to_fix(KD * T);
  localparam fix_t K_T  = to_fix(T);

  fix_t integ_q, integ_d, e1, e2;

  always_comb begin
    e1      = xm - xs;
    e2      = ym - ys;
    integ_d = integ_q + fmul(K_T, e1);
    ctrl    = fmul(K_PT, e1) + fmul(K_IT, integ_d) + fmul(K_DT, e2);
    err_x   = e1;
  end

  always_ff @(posedge clk) begin
    if (rst)     integ_q <= '0;
    else if (en) integ_q <= integ_d;
  end

endmodule
