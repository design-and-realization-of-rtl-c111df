// tb_ref_pkg: independent reference model used by the testbenches.
//
// Integer (longint) model of the fixed-point design: values are scaled by
// 2^24; products are taken at full precision and floored back by 24 bits.
// The coefficients are the published design's printed fixed-point constants written
// as integers (value * 2^24), not derived from the RTL's parameters:
//   1.0084 -> 16918145, 0.007 -> 117441, 1.001 -> 16793993,
//   0.001 -> 16777, 0.0025 -> 41943, -0.006 -> -100663,
//   Kp*T 0.00779 -> 130695, Ki*T 0.41621 -> 6982845, Kd*T 0.52933 -> 8880684,
//   COOK integration constant 0.0009768 -> 16388.
package tb_ref_pkg;

  localparam longint R_XX = 16918145;
  localparam longint R_TA = 117441;
  localparam longint R_YY = 16793993;
  localparam longint R_TB = 16777;
  localparam longint R_TC = 41943;
  localparam longint R_TN = -100663;
  localparam longint R_PT = 130695;
  localparam longint R_IT = 6982845;
  localparam longint R_DT = 8880684;
  localparam longint R_T  = 16777;
  localparam longint R_SC = 16388;
  localparam real    ONE  = 16777216.0;

  typedef struct {
    longint x;
    longint y;
    longint z;
    longint u;
  } ref_state_t;

  function automatic longint wrap32(longint v);
    return longint'(int'(v));
  endfunction

  function automatic longint rmul(longint a, longint b);
    longint p;
    p = a * b;
    return wrap32(p >>> 24);
  endfunction

  function automatic ref_state_t ref_step(ref_state_t s, longint c);
    ref_state_t n;
    n.x = wrap32(rmul(R_XX, s.x) - rmul(rmul(rmul(R_TA, s.x), s.u), s.u)
                 + rmul(R_TA, s.z) + c);
    n.y = wrap32(rmul(R_YY, s.y) - rmul(R_TB, s.z));
    n.z = wrap32(s.z + rmul(R_TC, s.y) - rmul(R_TC, s.x));
    n.u = wrap32(s.u + rmul(R_TN, s.x));
    return n;
  endfunction

  function automatic longint fix_of(real r);
    return longint'($rtoi(r * ONE + ((r < 0.0) ? -0.5 : 0.5)));
  endfunction

  function automatic real real_of(longint v);
    return real'(v) / ONE;
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Gaussian sample with standard deviation sigma (Box-Muller).
  function automatic real gauss(real sigma);
    real u1, u2;
    u1 = (real'($urandom_range(1000000, 1)) ) / 1000001.0;
    u2 = (real'($urandom_range(1000000, 0)) ) / 1000001.0;
    return sigma * $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

endpackage
