// mask_rx: chaotic masking receiver.
//
// The slave's regenerated carrier u_s is subtracted from the received signal:
//   i_rec[n] = s[n] - u_s[n].
// Once the slave is synchronized (u_s close to u_m) i_rec equals the
// transmitted information up to the residual synchronization error.  Purely
// combinational, fixed point (hc_pkg), wrap-around on overflow.
module mask_rx
  import hc_pkg::*;
(
  input  fix_t s,
  input  fix_t replica,
  output fix_t info_rec
);
  always_comb info_rec = s - replica;
endmodule
