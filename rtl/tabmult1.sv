// tabmult1: first-order tabulate-and-multiply evaluation of x^P on [1,2),
// P = -1 (FN_RECIP), -1/2 (FN_RSQRT) or +1/2 (FN_SQRT).
//
// The input x = x1 + x2 is split into its top M fraction bits (x1) and the
// remaining L = W-1-M bits (x2). Around c = x1 + 2^-(M+1) the two-term
// Taylor expansion is factored as
//     x^P ~ C' * x',   x' = c + P * (x2 - 2^-(M+1)),
//     C' = c^(P-1) + P(P-1) x1^(P-3) 2^-(2M+4),
// where the second term of C' centres the method error. C' comes from a
// 2^M-entry table indexed by x1; x' is built from bits only: x2 with its MSB
// inverted is F = x2 - 2^-(M+1), and x' is c plus -F or +/-F/2. One
// multiplication and a rounding to nearest give a faithful result:
// |y - x^P| < 2^-(W-1).
//
// Ports: x and y are (W, W-1) unsigned; x must have its integer bit set.
// Timing: one input per cycle. Stages: table read and x' (1), product (2),
// rounding (3); LATENCY = 4 by default, the reported latency, the last stage
// being output delay. The table holds W+G = 23 bits per entry for W = 21.
module tabmult1
  import fxp_pkg::*;
#(
  parameter fn_e FN      = FN_RECIP,
  parameter int  W       = 21,
  parameter int  M       = 10,
  parameter int  G       = 2,
  parameter int  LATENCY = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] x,
  output logic         out_valid,
  output logic [W-1:0] y
);
  localparam int NATIVE = 3;
  localparam int L   = W - 1 - M;
  localparam int FI  = W - 1 + G;    // C' fraction bits
  localparam int CW  = FI + 1;       // C' <= 1
  localparam int XPW = W + 2;        // x' in units 2^-W, unsigned, < 2.01

  function automatic logic [CW-1:0] c_entry(int i);
    real c, x1v, p;
    p   = fn_p(FN);
    x1v = 1.0 + real'(i) * $pow(2.0, -M);
    c   = x1v + $pow(2.0, -(M + 1));
    return CW'(rnd(($pow(c, p - 1.0) + p * (p - 1.0) * $pow(x1v, p - 3.0) * $pow(2.0, -(2 * M + 4)))
                   * $pow(2.0, FI)));
  endfunction

  logic [CW-1:0] c_rom [2**M];
  for (genvar i = 0; i < 2**M; i++) begin : g_tab
    localparam logic [CW-1:0] V = c_entry(i);
    assign c_rom[i] = V;
  end

  logic [M-1:0]            x1;
  logic signed [L-1:0]     f_s;
  logic signed [XPW:0]     c2, xp;
  always_comb begin
    x1  = x[W-2 -: M];
    f_s = signed'({~x[L-1], x[L-2:0]});
    c2  = signed'((XPW+1)'({1'b1, x1, 1'b1}) << L);   // units 2^-W
    case (FN)
      FN_RECIP: xp = c2 - ((XPW+1)'(f_s) <<< 1);
      FN_RSQRT: xp = c2 - (XPW+1)'(f_s);
      default:  xp = c2 + (XPW+1)'(f_s);
    endcase
  end

  logic [CW-1:0]      c1_q;
  logic [XPW-1:0]     xp1_q;
  logic [CW+XPW-1:0]  p2_q;
  logic [W-1:0]       y3_q;
  logic [NATIVE-1:0]  v_q;
  logic [CW+XPW-1:0]  p_round;

  assign p_round = p2_q + ((CW+XPW)'(1) << FI);   // half an output ulp

  always_ff @(posedge clk) begin
    if (rst) v_q <= '0;
    else     v_q <= {v_q[NATIVE-2:0], in_valid};
    c1_q  <= c_rom[x1];
    xp1_q <= XPW'(unsigned'(xp));
    p2_q  <= c1_q * xp1_q;
    y3_q  <= W'(p_round >> (FI + 1));
  end

  pipe_delay #(.W(W), .DEPTH(LATENCY - NATIVE)) u_out (
    .clk, .rst, .in_valid(v_q[NATIVE-1]), .in_data(y3_q),
    .out_valid, .out_data(y)
  );

  initial assert (LATENCY >= NATIVE) else $error("tabmult1: LATENCY below pipeline depth");
endmodule
