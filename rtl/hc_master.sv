// hc_master: free-running memristive hyperchaotic oscillator (the master, or
// transmitter-side chaos generator).
//
// Four 32-bit state registers (x, y, z, u) are advanced by one forward-Euler
// step (hc_euler_step) on every clock edge with en high, so one enabled clock
// is one sample n -> n+1.  Synchronous active-high reset loads the initial
// condition, by default the published design's (0.1, 0, 0, 0).  The state output is
// the register contents, i.e. sample n is valid in the cycle after the edge
// that computed it.  Equations and coefficients follow the published design; the
// reset, enable and fixed-point word are this design's choices.
module hc_master
  import hc_pkg::*;
#(
  parameter real X0 = 0.1,
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
  parameter real T  = 0.001
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      en,
  output hc_state_t state
);

  hc_state_t s_next;

  hc_euler_step #(
    .A(A), .B(B), .C(C), .D(D), .M0(M0), .M1(M1), .N(N), .T(T)
  ) u_step (
    .s      (state),
    .ctrl   ('0),
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
