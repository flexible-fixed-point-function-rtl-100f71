// bipartite: bipartite-table approximation of 1/x or 1/sqrt(x) for x in [1,2).
//
// The input x is in (WIN, WIN-1) unsigned format (one integer bit, which is 1
// for a valid input). Below the leading one, the first A+B+C fraction bits are
// split into x0 (A bits), x1 (B bits) and x2 (C bits); the remaining bits are
// ignored. Two tables are read in parallel:
//   TIV[x0,x1] = f at the centre of the (x0,x1) interval,
//   TO [x0,x2] = f'(centre of the x0 interval) * (offset of x2's interval
//                centre from the (x0,x1) centre), a signed correction,
// and y = TIV + TO. Entries are rounded to OUTF fraction bits and computed at
// elaboration from the closed-form function.
//
// The bipartite method itself is a classical one; this block is the initial
// approximation that bootstraps the Newton-Raphson and Halley iterations.
// The defaults (A,B,C) = (3,5,3) and OUTF = 12 give the table sizes of the
// published cubic-iteration reciprocal: TIV 256 x 13 and TO 64 x 4. The TO
// width is derived from its largest entry. Worst error is about 2^-10.8 for
// 1/x and 2^-11.5 for 1/sqrt(x); each iteration block checks that its own
// split is accurate enough for its 32-bit result.
//
// Timing: the tables are registered (cycle 1), the sum is registered
// (cycle 2): LATENCY = 2, one input per cycle. y is in (OUTF+1, OUTF) format.
module bipartite
  import fxp_pkg::*;
#(
  parameter fn_e FN   = FN_RECIP,
  parameter int  WIN  = 32,
  parameter int  A    = 3,
  parameter int  B    = 5,
  parameter int  C    = 3,
  parameter int  OUTF = 12
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  logic [WIN-1:0]  x,
  output logic            out_valid,
  output logic [OUTF:0]   y
);
  localparam int TW = OUTF + 1;          // TIV width, unsigned

  // TIV entry for index {x0,x1}.
  function automatic logic [TW-1:0] tiv_entry(int idx);
    real xm;
    xm = 1.0 + real'(idx) * $pow(2.0, -(A + B)) + $pow(2.0, -(A + B + 1));
    return TW'(rnd(fn_eval(FN, xm) * $pow(2.0, OUTF)));
  endfunction

  // TO value for index {x0,x2}, as a signed integer in units of 2^-OUTF.
  function automatic longint to_val(int idx);
    int  i0, i2;
    real xc, d2;
    i0 = idx >> C;
    i2 = idx & ((1 << C) - 1);
    xc = 1.0 + real'(i0) * $pow(2.0, -A) + $pow(2.0, -(A + 1));
    d2 = real'(i2) * $pow(2.0, -(A + B + C)) + $pow(2.0, -(A + B + C + 1))
       - $pow(2.0, -(A + B + 1));
    return rnd(fn_deriv(FN, xc) * d2 * $pow(2.0, OUTF));
  endfunction

  // TO width: just enough for the largest entry. |f'| falls with x and the
  // offsets are symmetric, so the largest magnitude is at x0 = 0 and x2 at
  // either end of its range.
  function automatic int to_width();
    longint m0, m1, m;
    m0 = to_val(0);
    m1 = to_val((1 << C) - 1);
    m0 = (m0 < 0) ? -m0 : m0;
    m1 = (m1 < 0) ? -m1 : m1;
    m  = (m0 > m1) ? m0 : m1;
    return $clog2(m + 1) + 1;
  endfunction
  localparam int OW = to_width();        // TO width, signed

  logic [TW-1:0] tiv_rom [2**(A+B)];
  logic [OW-1:0] to_rom  [2**(A+C)];
  for (genvar i = 0; i < 2**(A+B); i++) begin : g_tiv
    localparam logic [TW-1:0] V = tiv_entry(i);
    assign tiv_rom[i] = V;
  end
  for (genvar i = 0; i < 2**(A+C); i++) begin : g_to
    localparam logic [OW-1:0] V = OW'(to_val(i));
    assign to_rom[i] = V;
  end

  logic [A-1:0] x0;
  logic [B-1:0] x1;
  logic [C-1:0] x2;
  assign x0 = x[WIN-2 -: A];
  assign x1 = x[WIN-2-A -: B];
  assign x2 = x[WIN-2-A-B -: C];

  logic          v1_q, v2_q;
  logic [TW-1:0] tiv_q;
  logic [OW-1:0] to_q;
  logic [TW-1:0] y_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1_q <= 1'b0;
      v2_q <= 1'b0;
    end else begin
      v1_q <= in_valid;
      v2_q <= v1_q;
    end
    tiv_q <= tiv_rom[{x0, x1}];
    to_q  <= to_rom[{x0, x2}];
    y_q   <= tiv_q + TW'(signed'(to_q));
  end

  assign out_valid = v2_q;
  assign y         = y_q;

  initial begin
    assert (A + B + C <= WIN - 1) else $error("bipartite: A+B+C exceeds the input fraction");
  end
endmodule
