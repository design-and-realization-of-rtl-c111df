// hc_slave: receiver-side copy of the memristive hyperchaotic oscillator,
// driven toward the master by an external control term.
//
// Same Euler step as the master, but the controller output ctrl (fixed
// point, already scaled by the step T) is added to the x update:
//   x[n+1] = x-step(x[n], z[n], u[n]) + ctrl[n].
// ctrl is sampled on the same enabled edge that advances the state, so the
// controller may compute it combinationally from the current states.  Reset
// loads the slave's own initial condition, by default the published design's
// (0, 0, 0, 0), which differs from the master's.
//
// The slave's x self-coefficient KXX defaults to the value the equations give
// (1 - T*a*m0 = 1.0084, identical to the master).  The slave block diagram of
// the published design prints 1.0061 for that coefficient; it can be set
// through KXX.
module hc_slave
  import hc_pkg::*;
#(
  parameter real X0 = 0.0,
  parameter real Y0 = 0.0,
  parameter real Z0 = 0.0,
  parameter real U0 = 0.0,
  parameter real A  = 7.0,
  parameter real B  = 1.0,
  parameter real C  = 2.5,
  parameter real D  = 1.0,
  parameter real M0 = -1.2,
  parameter real M1 = 1.0,
  parameter real N  = -6.0,
  parameter real T  = 0.001,
  parameter real KXX = 1.0 - T * A * M0
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      en,
  input  fix_t      ctrl,
  output hc_state_t state
);

  hc_state_t s_next;

  hc_euler_step #(
    .A(A), .B(B), .C(C), .D(D), .M0(M0), .M1(M1), .N(N), .T(T), .KXX(KXX)
  ) u_step (
    .s      (state),
    .ctrl   (ctrl),
    .s_next (s_next)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state.x <= to_fix(X0);
      state.y <= to_fix(Y0);
      state.z <= to_fix(Z0);
      state.u <= to_fix(U0);
    end else if (en) begin
      state <= s_next;
    end
  end

endmodule
