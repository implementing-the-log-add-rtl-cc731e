// logadd_ref_pkg: reference model of the log-add unit for the testbenches.
//
// exact_t(d) is the real-valued correction K ln(1 + exp(-d/K)). ref_t(d) is
// the value the hardware is specified to give: the rounded correction at
// the even number d & ~1 below 16384, then 2, 1 and 0 in the ranges ending
// at 17471 and 20077. ref_region(d) names the range (0 table, 1 two,
// 2 one, 3 zero). absr is the magnitude of a real. ref_sum returns min(a, b) - ref_t(|a - b|), clamped at 0.
package logadd_ref_pkg;

  localparam real K = 2371.8;

  function automatic real exact_t(longint unsigned d);
    return K * $ln(1.0 + $exp(-real'(d) / K));
  endfunction

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic int ref_region(longint unsigned d);
    if (d < 64'd16384) return 0;
    if (d < 64'd17471) return 1;
    if (d < 64'd20077) return 2;
    return 3;
  endfunction

  function automatic int unsigned ref_t(longint unsigned d);
    case (ref_region(d))
      0:       return int'($floor(exact_t(d & ~64'd1) + 0.5));
      1:       return 2;
      2:       return 1;
      default: return 0;
    endcase
  endfunction

  function automatic longint unsigned ref_sum(longint unsigned a,
                                              longint unsigned b,
                                              output bit sat);
    longint unsigned lo, hi, t;
    lo  = (a < b) ? a : b;
    hi  = (a < b) ? b : a;
    t   = longint'(ref_t(hi - lo));
    sat = t > lo;
    return sat ? 0 : lo - t;
  endfunction

endpackage
