// mask_tx: chaotic masking transmitter.
//
// The information sample is added to the master's hyperchaotic carrier u_m:
//   s[n] = u_m[n] + i[n].
// Purely combinational, fixed point (hc_pkg), wrap-around on overflow.  For
// the receiver to stay synchronized the information must be much weaker than
// the carrier (the carrier swings about +/-5).
module mask_tx
  import hc_pkg::*;
(
  input  fix_t carrier,
  input  fix_t info,
  output fix_t s
);
  always_comb s = carrier + info;
endmodule
