// em_ref_pkg: reference arithmetic for the accelerator testbenches.
//
// Computes the values the datapath must produce straight from the equations,
// with wide native integers and real-valued exp(), independently of the
// pipelined RTL. Integer stages (distance terms, sums) are bit-exact; values
// after the exponential are compared with a tolerance.
package em_ref_pkg;

  localparam longint unsigned SAT = 64'h7FFF_FFFF;

  // ((y - mu) / sigma)^2 in 16.16, saturated
  function automatic longint unsigned ref_term(int unsigned y, int unsigned mu, int unsigned sigma);
    longint unsigned d, q, sq;
    d = (y > mu) ? longint'(y - mu) : longint'(mu - y);
    if (sigma == 0) return SAT;
    q = (d * 65536) / sigma;            // 16.16 quotient
    if (q >= 64'h1_0000_0000) return SAT;
    sq = (q * q) >> 16;
    return (sq > SAT) ? SAT : sq;
  endfunction

  // sum of nonnegative terms saturated at the end (same as saturating steps)
  function automatic longint unsigned ref_sat(longint unsigned s);
    return (s > SAT) ? SAT : s;
  endfunction

  // e^(x/2^16) * 2^16 as a real, clamped the way a 16.16 unsigned output is
  function automatic real ref_exp_real(longint signed x);
    real e;
    e = $exp(real'(x) / 65536.0) * 65536.0;
    if (e > real'(SAT)) e = real'(SAT);
    return e;
  endfunction

  // p_ij * pi_j from the halved sum, varsum and mixture, as a real in LSBs
  function automatic real ref_result(longint unsigned half_sum, longint signed varsum,
                                     int unsigned mixture);
    longint signed x;
    x = varsum - longint'(half_sum);
    if (x < -64'sh8000_0000) x = -64'sh8000_0000;
    return ref_exp_real(x) * real'(mixture) / 65536.0;
  endfunction

  // true when got is within rel relative error plus abs_lsb LSBs of expected
  function automatic bit close(real got, real expected, real rel, real abs_lsb);
    real diff;
    diff = got - expected;
    if (diff < 0) diff = -diff;
    return diff <= rel * expected + abs_lsb;
  endfunction

endpackage
