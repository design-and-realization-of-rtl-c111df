// hc_euler_step: one forward-Euler step of the 4-D memristive hyperchaotic
// system, purely combinational.
//
// Continuous system (a..n are circuit constants, the memristor is the
// m0 + m1*u^2 term):
//   x' = a z - a x (m0 + m1 u^2)
//   y' = b d y - b z
//   z' = c y - c x
//   u' = n x
// With step T the update is computed with pre-multiplied coefficients, in the
// same order as the reference block diagram:
//   x+ = (1 - T a m0) x - ((T a m1 x) u) u + (T a) z + ctrl
//   y+ = (1 + T b d) y - (T b) z
//   z+ = z + (T c) y - (T c) x
//   u+ = u + (T n) x
// The defaults (a=7, b=1, c=2.5, d=1, m0=-1.2, m1=1, n=-6, T=1e-3) are the
// published values.  ctrl is an extra term added to the x update; the master ties
// it to zero and the slave receives the synchronizing controller output
// there.  Overflow wraps; the default system never comes near the range.
module hc_euler_step
  import hc_pkg::*;
#(
  parameter real A  = 7.0,
  parameter real B  = 1.0,
  parameter real C  = 2.5,
  parameter real D  = 1.0,
  parameter real M0 = -1.2,
  parameter real M1 = 1.0,
  parameter real N  = -6.0,
  parameter real T  = 0.001,
  // Coefficient of x in the x update; 1 - T*A*M0 unless overridden.
  parameter real KXX = 1.0 - T * A * M0
) (
  input  hc_state_t s,
  input  fix_t      ctrl,
  output hc_state_t s_next
);

  localparam fix_t K_XX  = to_fix(KXX);
  localparam fix_t K_TAM = to_fix(T * A * M1);
  localparam fix_t K_TA  = to_fix(T * A);
  localparam fix_t K_YY  = to_fix(1.0 + T * B * D);
  localparam fix_t K_TB  = to_fix(T * B);
  localparam fix_t K_TC  = to_fix(T * C);
  localparam fix_t K_TN  = to_fix(T * N);

  fix_t xu2;

  always_comb begin
    xu2        = fmul(fmul(fmul(K_TAM, s.x), s.u), s.u);
    s_next.x   = fmul(K_XX, s.x) - xu2 + fmul(K_TA, s.z) + ctrl;
    s_next.y   = fmul(K_YY, s.y) - fmul(K_TB, s.z);
    s_next.z   = s.z + fmul(K_TC, s.y) - fmul(K_TC, s.x);
    s_next.u   = s.u + fmul(K_TN, s.x);
  end

endmodule
