// cook_mod: chaotic on-off keying (COOK) modulator.
//
// The chaotic sample is switched onto the channel for a 1 bit and replaced
// by zero for a 0 bit:  s[n] = bit ? c[n] : 0.
// Purely combinational; the caller holds bit constant for a whole bit period
// (see cook_sys).
module cook_mod
  import hc_pkg::*;
(
  input  fix_t chaos,
  input  logic bit_i,
  output fix_t s
);
  always_comb s = bit_i ? chaos : '0;
endmodule
