// tabmult2: second-order tabulate-and-multiply evaluation of x^P on [1,2),
// P = -1 (FN_RECIP), -1/2 (FN_RSQRT) or +1/2 (FN_SQRT).
//
// The input x = x1 + x2 is split into its top M fraction bits (x1) and the
// remaining L = W-1-M bits (x2). Around c = x1 + 2^-(M+1) the three-term
// Taylor expansion is regrouped as
//     x^P ~ D * (G + P * F * x'),   D = c^(P-2), G = c^2,
//     F = x2 - 2^-(M+1),            x' = c + (P-1)/2 * F.
// D and G are read from one table indexed by x1. F is x2 with its MSB
// inverted, read as a signed number. x' is c (a constant pattern of x1) plus
// -F, -3F/4 or -F/4, i.e. shifts and one addition. The products F*x' and
// D*[...] are truncated G guard bits below the output LSB; multiplying by P
// is a negation and/or a one-bit shift. The result is rounded to nearest
// and is faithful: |y - x^P| < 2^-(W-1).
//
// Ports: x and y are (W, W-1) unsigned; x must have its integer bit set.
// Timing: one input per cycle. Register stages: table read and F/x'
// (1), F*x' (2), G + P*F*x' (3), D*[...] (4), rounding (5); LATENCY defaults
// to the latency reported for each function (5, 9, 8) and the stages above
// 5 are output delay. G = 4 follows the guard-bit bound g > 2+log2(2-P).
module tabmult2
  import fxp_pkg::*;
#(
  parameter fn_e FN      = FN_RECIP,
  parameter int  W       = 24,
  parameter int  M       = 8,
  parameter int  G       = 4,
  parameter int  LATENCY = (FN == FN_RECIP) ? 5 : ((FN == FN_RSQRT) ? 9 : 8)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] x,
  output logic         out_valid,
  output logic [W-1:0] y
);
  localparam int NATIVE = 5;
  localparam int L  = W - 1 - M;     // x2 bits
  localparam int FI = W - 1 + G;     // internal fraction bits
  localparam int DW = FI + 1;        // D <= 1
  localparam int GW = FI + 2;        // G < 4
  localparam int XPW = W + 4;        // x' in units 2^-(W+1), signed, may reach 2
  localparam int PW = L + XPW;       // F*x' full product
  localparam int TW = FI + 4;        // T = G + P*F*x', signed

  function automatic logic [DW-1:0] d_entry(int i);
    real c;
    c = 1.0 + real'(i) * $pow(2.0, -M) + $pow(2.0, -(M + 1));
    return DW'(rnd($pow(c, fn_p(FN) - 2.0) * $pow(2.0, FI)));
  endfunction
  function automatic logic [GW-1:0] g_entry(int i);
    real c;
    c = 1.0 + real'(i) * $pow(2.0, -M) + $pow(2.0, -(M + 1));
    return GW'(rnd(c * c * $pow(2.0, FI)));
  endfunction

  logic [DW-1:0] d_rom [2**M];
  logic [GW-1:0] g_rom [2**M];
  for (genvar i = 0; i < 2**M; i++) begin : g_tab
    localparam logic [DW-1:0] DV = d_entry(i);
    localparam logic [GW-1:0] GV = g_entry(i);
    assign d_rom[i] = DV;
    assign g_rom[i] = GV;
  end

  // ---- combinational front: F and x'
  logic [M-1:0]          x1;
  logic signed [L-1:0]   f_s;
  logic signed [XPW-1:0] c4, xp;
  always_comb begin
    x1  = x[W-2 -: M];
    f_s = signed'({~x[L-1], x[L-2:0]});
    // c in units of 2^-(W+1): 1 . x1 1 followed by zeros
    c4  = signed'(XPW'({1'b1, x1, 1'b1}) <<< (L + 1));
    case (FN)
      FN_RECIP: xp = c4 - (XPW'(f_s) <<< 2);
      FN_RSQRT: xp = c4 - 3 * XPW'(f_s);
      default:  xp = c4 - XPW'(f_s);
    endcase
  end

  logic [DW-1:0]          d1_q, d2_q, d3_q;
  logic [GW-1:0]          g1_q, g2_q;
  logic signed [L-1:0]    f1_q;
  logic signed [XPW-1:0]  xp1_q;
  logic signed [TW-1:0]   m2_q;   // P*F*x', units 2^-FI
  logic signed [TW-1:0]   t3_q;
  logic [DW+TW-1:0]       y4_q;
  logic [W-1:0]           y5_q;
  logic [NATIVE-1:0]      v_q;

  logic signed [PW-1:0]   prod;
  logic signed [TW-1:0]   pm;
  logic [DW+TW-1:0]       dt;
  always_comb begin
    prod = f1_q * xp1_q;   // units 2^-2W
    case (FN)
      FN_RECIP: pm = -TW'(prod >>> (W + 1 - G));
      FN_RSQRT: pm = -TW'(prod >>> (W + 2 - G));
      default:  pm =  TW'(prod >>> (W + 2 - G));
    endcase
    dt = (DW+TW)'(d3_q) * (DW+TW)'(unsigned'(t3_q));
  end

  always_ff @(posedge clk) begin
    if (rst) v_q <= '0;
    else     v_q <= {v_q[NATIVE-2:0], in_valid};
    d1_q  <= d_rom[x1];
    g1_q  <= g_rom[x1];
    f1_q  <= f_s;
    xp1_q <= xp;
    m2_q  <= pm;
    d2_q  <= d1_q;
    g2_q  <= g1_q;
    t3_q  <= TW'(g2_q) + m2_q;
    d3_q  <= d2_q;
    y4_q  <= dt + ((DW+TW)'(1) << (FI + G - 1));
    y5_q  <= W'(y4_q >> (FI + G));
  end

  pipe_delay #(.W(W), .DEPTH(LATENCY - NATIVE)) u_out (
    .clk, .rst, .in_valid(v_q[NATIVE-1]), .in_data(y5_q),
    .out_valid, .out_data(y)
  );

  initial begin
    assert (LATENCY >= NATIVE) else $error("tabmult2: LATENCY below pipeline depth");
    assert (W + 1 >= G) else $error("tabmult2: too many guard bits");
  end
endmodule
