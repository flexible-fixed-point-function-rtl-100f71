// halley_recip: 32-bit fixed-point reciprocal 1/a for a in [1,2), computed by
// one cubically convergent iteration started from a bipartite approximation.
//
// With x0 ~ 1/a from the bipartite tables and h = 1 - a*x0, the iteration
// x1 = x0*(1 + h*(1 + h)) is evaluated in the form
//     x1 = x0 + x0*(h + h^2).
// Because x0 is accurate to about 10.8 bits, |h| < 2^-H_MSB, so h is kept on
// few bits, its square is small, and the product x0*(h+h^2) only needs the
// bits that land below 2^-H_MSB. Internal values carry G guard bits below
// the output LSB; products are truncated and the final result is rounded to
// nearest. The result is faithful: |y - 1/a| < 2^-(W-1).
//
// Ports: a and y are (W, W-1) unsigned; a must have its integer bit set.
// Timing: fully pipelined, one input per cycle, y valid LATENCY cycles after
// a (LATENCY = 11 by default, the latency reported for this operator; the
// datapath itself has 9 register stages and the rest is output delay).
// The bipartite split (3,5,3 bits, 12 output fraction bits) gives the
// published table sizes, 256 x 13 and 64 x 4. The worst iteration error is
// then 2^-32.4 (0.38 ulp, from evaluating every seed interval), and G = 6, a
// choice of this design, keeps the truncations near 0.05 ulp.
module halley_recip
  import fxp_pkg::*;
#(
  parameter int W       = 32,
  parameter int G       = 6,
  parameter int BA      = 3,
  parameter int BB      = 5,
  parameter int BC      = 3,
  parameter int M       = 12,
  parameter int H_MSB   = 10,
  parameter int LATENCY = 11
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] a,
  output logic         out_valid,
  output logic [W-1:0] y
);
  localparam int NATIVE = 9;
  localparam int XW = M + 1;           // x0 width, (M+1, M)
  localparam int FI = W - 1 + G;       // internal fraction bits
  localparam int HW = FI - H_MSB + 1;  // h width, signed

  // ---- stage 1-2: bipartite initial approximation
  logic          bv;
  logic [XW-1:0] x0_b;
  bipartite #(.FN(FN_RECIP), .WIN(W), .A(BA), .B(BB), .C(BC), .OUTF(M)) u_bip (
    .clk, .rst, .in_valid, .x(a), .out_valid(bv), .y(x0_b)
  );
  logic [W-1:0] a1_q, a2_q;
  always_ff @(posedge clk) begin
    a1_q <= a;
    a2_q <= a1_q;
  end

  // ---- stage 3: p = a * x0
  logic [W+XW-1:0] p3_q;
  logic [XW-1:0]   x3_q;
  // ---- stage 4: h = 1 - p, truncated to FI fraction bits and HW bits
  logic signed [HW-1:0] h4_q;
  logic [XW-1:0]        x4_q;
  // ---- stage 5: h^2
  logic signed [HW-1:0] h5_q, hh5_q;
  logic [XW-1:0]        x5_q;
  // ---- stage 6: s = h + h^2
  logic signed [HW:0]   s6_q;
  logic [XW-1:0]        x6_q;
  // ---- stage 7: q = x0 * s
  logic signed [HW+1:0] q7_q;
  logic [XW-1:0]        x7_q;
  // ---- stage 8: r = x0 + q
  logic signed [FI+2:0] r8_q;
  // ---- stage 9: rounding
  logic [W-1:0]         y9_q;
  logic [NATIVE-3:0]    v_q;   // valid of stages 3..9

  logic signed [W+XW:0]     h_full;
  logic signed [2*HW-1:0]   hh_full;
  logic signed [XW+HW+1:0]  q_full;
  logic signed [FI+2:0]     r_round;

  always_comb begin
    h_full  = (W+XW+1)'(1) <<< (W - 1 + M);
    h_full  = h_full - signed'({1'b0, p3_q});
    hh_full = h4_q * h4_q;
    q_full  = signed'({1'b0, x6_q}) * s6_q;
    r_round = r8_q + (FI+3)'(1 <<< (G - 1));
  end

  always_ff @(posedge clk) begin
    if (rst) v_q <= '0;
    else     v_q <= {v_q[NATIVE-4:0], bv};
    p3_q  <= a2_q * x0_b;
    x3_q  <= x0_b;
    h4_q  <= HW'(h_full >>> (M - G));
    x4_q  <= x3_q;
    h5_q  <= h4_q;
    hh5_q <= HW'(hh_full >>> FI);
    x5_q  <= x4_q;
    s6_q  <= (HW+1)'(h5_q) + (HW+1)'(hh5_q);
    x6_q  <= x5_q;
    q7_q  <= (HW+2)'(q_full >>> M);
    x7_q  <= x6_q;
    r8_q  <= ((FI+3)'(x7_q) <<< (FI - M)) + (FI+3)'(q7_q);
    y9_q  <= W'(r_round >>> G);
  end

  pipe_delay #(.W(W), .DEPTH(LATENCY - NATIVE)) u_out (
    .clk, .rst, .in_valid(v_q[NATIVE-3]), .in_data(y9_q),
    .out_valid, .out_data(y)
  );

  // h must fit in HW bits: the bipartite error bound guarantees |h| < 2^-H_MSB.
  property p_h_fits;
    @(posedge clk) disable iff (rst)
      v_q[0] |-> ((h_full >>> (M - G)) == (W+XW+1)'(signed'(HW'(h_full >>> (M - G)))));
  endproperty
  a_h_fits: assert property (p_h_fits) else $error("halley_recip: |h| exceeds 2^-H_MSB");

  initial begin
    assert (LATENCY >= NATIVE) else $error("halley_recip: LATENCY below pipeline depth");
    assert (M >= G) else $error("halley_recip: M must be at least G");
  end
endmodule
