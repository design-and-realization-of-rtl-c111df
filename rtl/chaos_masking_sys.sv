// chaos_masking_sys: synchronized master/slave hyperchaotic link with chaotic
// masking (analog modulation).
//
// The master oscillator (initial state 0.1,0,0,0) and the slave oscillator
// (initial state 0,0,0,0) advance one Euler step per enabled clock.  The PID
// controller compares master and slave x and y and adds its output to the
// slave's x update, so the slave converges onto the master trajectory.  The
// information sample info is added to the master's u state to form the
// transmitted signal s; the receiver subtracts the slave's u state to recover
// it.  s and info_rec are combinational from the current states and info, so
// a sample applied in a cycle comes back in the same cycle.  The structure
// (master, PID, slave, u as carrier) follows the published design; in a real link s
// would travel through a channel, here both ends sit side by side and only
// the controller links them, as in the published design.
module chaos_masking_sys
  import hc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      en,
  input  fix_t      info,
  output fix_t      s,
  output fix_t      info_rec,
  output hc_state_t master_state,
  output hc_state_t slave_state,
  output fix_t      ctrl,
  output fix_t      err_x
);

  hc_master u_master (
    .clk   (clk),
    .rst   (rst),
    .en    (en),
    .state (master_state)
  );

  pid_sync u_pid (
    .clk   (clk),
    .rst   (rst),
    .en    (en),
    .xm    (master_state.x),
    .xs    (slave_state.x),
    .ym    (master_state.y),
    .ys    (slave_state.y),
    .ctrl  (ctrl),
    .err_x (err_x)
  );

  hc_slave u_slave (
    .clk   (clk),
    .rst   (rst),
    .en    (en),
    .ctrl  (ctrl),
    .state (slave_state)
  );

  mask_tx u_tx (
    .carrier (master_state.u),
    .info    (info),
    .s       (s)
  );

  mask_rx u_rx (
    .s        (s),
    .replica  (slave_state.u),
    .info_rec (info_rec)
  );

endmodule
