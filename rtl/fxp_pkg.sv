// fxp_pkg: types and elaboration-time helpers shared by the fixed-point
// function operators.
//
// The operators compute x^P for P in {-1, -1/2, +1/2}. Every table in the
// design is filled at elaboration from the closed-form function, so the
// helpers here are constant functions working in `real` arithmetic; none of
// them ends up as hardware. m10k_blocks() models the memory blocks of the
// target FPGA family (10 Kbit blocks usable as 2048x5, 1024x10, 512x20 or
// 256x40); the operators use it to choose between alternative table layouts
// the way a function generator would.
package fxp_pkg;

  // Function selector: P = -1, -1/2, +1/2.
  typedef enum logic [1:0] {
    FN_RECIP = 2'd0,
    FN_RSQRT = 2'd1,
    FN_SQRT  = 2'd2
  } fn_e;

  // f(x) = x^P.
  function automatic real fn_eval(fn_e fn, real x);
    case (fn)
      FN_RECIP: return 1.0 / x;
      FN_RSQRT: return 1.0 / $sqrt(x);
      default:  return $sqrt(x);
    endcase
  endfunction

  // f'(x).
  function automatic real fn_deriv(fn_e fn, real x);
    case (fn)
      FN_RECIP: return -1.0 / (x * x);
      FN_RSQRT: return -0.5 / (x * $sqrt(x));
      default:  return 0.5 / $sqrt(x);
    endcase
  endfunction

  // Exponent P as a real number.
  function automatic real fn_p(fn_e fn);
    case (fn)
      FN_RECIP: return -1.0;
      FN_RSQRT: return -0.5;
      default:  return 0.5;
    endcase
  endfunction

  // Round a non-negative or negative real to the nearest integer.
  function automatic longint rnd(real v);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  // Memory blocks of 10 Kbit needed for a depth x width table, taking the
  // cheapest of the four aspect ratios.
  function automatic int m10k_blocks(longint depth, int width);
    int best, n, i;
    longint d[4];
    longint w[4];
    d = '{2048, 1024, 512, 256};
    w = '{5, 10, 20, 40};
    if (depth <= 0 || width <= 0) return 0;
    best = 1 << 30;
    for (i = 0; i < 4; i++) begin
      n = int'(((depth + d[i] - 1) / d[i]) * ((longint'(width) + w[i] - 1) / w[i]));
      if (n < best) best = n;
    end
    return best;
  endfunction

endpackage
