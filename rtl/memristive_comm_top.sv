// memristive_comm_top: the two communication links built on the memristive
// hyperchaotic oscillator, side by side.
//
//  * mask_*: analog chaotic masking.  A master and a PID-synchronized slave
//    oscillator; mask_info is hidden in the master's u state (mask_s) and
//    recovered with the slave's u state (mask_info_rec), same cycle.
//  * cook_*: digital COOK.  One oscillator switched on and off by the data
//    bits (cook_s to the channel), the channel output comes back on cook_r in
//    the same cycle, and the energy detector returns cook_rx_bit with a
//    one-cycle cook_rx_valid, one bit period after the bit started.
//
// The two links share clock, synchronous active-high reset and the sample
// enable en (one Euler step per enabled clock) but are otherwise
// independent; in the reference work they were two separate FPGA designs.
// Numbers are hc_pkg fixed point (32 bits, 24 fraction bits).
module memristive_comm_top
  import hc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      en,
  // chaotic masking link
  input  fix_t      mask_info,
  output fix_t      mask_s,
  output fix_t      mask_info_rec,
  output hc_state_t mask_master,
  output hc_state_t mask_slave,
  output fix_t      mask_ctrl,
  output fix_t      mask_err_x,
  // COOK link
  input  logic      cook_tx_bit,
  output logic      cook_bit_req,
  output fix_t      cook_s,
  input  fix_t      cook_r,
  input  fix_t      cook_threshold,
  output logic      cook_rx_bit,
  output logic      cook_rx_valid,
  output fix_t      cook_energy,
  output hc_state_t cook_chaos
);

  chaos_masking_sys u_mask (
    .clk          (clk),
    .rst          (rst),
    .en           (en),
    .info         (mask_info),
    .s            (mask_s),
    .info_rec     (mask_info_rec),
    .master_state (mask_master),
    .slave_state  (mask_slave),
    .ctrl         (mask_ctrl),
    .err_x        (mask_err_x)
  );

  cook_sys u_cook (
    .clk         (clk),
    .rst         (rst),
    .en          (en),
    .tx_bit      (cook_tx_bit),
    .bit_req     (cook_bit_req),
    .s_out       (cook_s),
    .r_in        (cook_r),
    .threshold   (cook_threshold),
    .rx_bit      (cook_rx_bit),
    .rx_valid    (cook_rx_valid),
    .energy      (cook_energy),
    .chaos_state (cook_chaos)
  );

endmodule
