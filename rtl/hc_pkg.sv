// hc_pkg: number format and shared types of the memristive hyperchaotic
// communication design.
//
// All signals are signed two's complement fixed point, 32 bits wide with 24
// fraction bits (range about +/-128, resolution 2^-24).  The 24 fraction bits
// follow from the coefficient values of the published design: every printed
// coefficient (1.0084 -> 1.008400022983551, 0.0025 -> 0.002499997615814209,
// ...) is exactly the nearest multiple of 2^-24.  The 32-bit word width is
// this design's choice; the chaotic states stay within about +/-5.
//
// fmul() multiplies two fixed-point values at full 64-bit precision and
// truncates (arithmetic shift, rounds toward minus infinity) back to the
// same format.  to_fix() turns a real constant into the nearest fixed value
// and is meant for elaboration-time constants only.
package hc_pkg;

  localparam int W    = 32;
  localparam int FRAC = 24;

  typedef logic signed [W-1:0] fix_t;

  // State vector of one oscillator: x = v_C1, y = v_C2, z = i_L, u = v_CM.
  typedef struct packed {
    fix_t x;
    fix_t y;
    fix_t z;
    fix_t u;
  } hc_state_t;

  function automatic fix_t to_fix(real r);
    real scaled;
    scaled = r * (2.0 ** FRAC);
    if (scaled < 0.0) return fix_t'($rtoi(scaled - 0.5));
    else              return fix_t'($rtoi(scaled + 0.5));
  endfunction

  function automatic fix_t fmul(fix_t a, fix_t b);
    logic signed [2*W-1:0] p;
    p = (2*W)'(a) * (2*W)'(b);
    return fix_t'(p >>> FRAC);
  endfunction

endpackage
