// fxp_check_pkg: reference checks shared by the testbenches.
//
// faithful() decides, in exact integer arithmetic, whether an output y in
// (W, W-1) format is within one unit in the last place of x^P for an input x
// in (W, W-1) format: |y - x^P| < 2^-(W-1).
package fxp_check_pkg;
  import fxp_pkg::*;

  function automatic bit faithful(fn_e fn, int w, logic [63:0] x, logic [63:0] y);
    logic [191:0] xe, lo, hi, e;
    xe = 192'(x);
    lo = (y == 0) ? 192'(0) : 192'(y) - 1;
    hi = 192'(y) + 1;
    case (fn)
      FN_RECIP: begin  // (y-1)*x < 2^(2(w-1)) < (y+1)*x
        e = 192'(1) << (2 * (w - 1));
        return (lo * xe < e) && (e < hi * xe);
      end
      FN_RSQRT: begin  // (y-1)^2*x < 2^(3(w-1)) < (y+1)^2*x
        e = 192'(1) << (3 * (w - 1));
        return (lo * lo * xe < e) && (e < hi * hi * xe);
      end
      default: begin   // (y-1)^2 < x*2^(w-1) < (y+1)^2
        e = xe << (w - 1);
        return (lo * lo < e) && (e < hi * hi);
      end
    endcase
  endfunction
endpackage
