// newton_recip: 32-bit fixed-point reciprocal 1/a for a in [1,2), by one
// Newton-Raphson iteration started from a bipartite approximation.
//
// With x0 ~ 1/a accurate to about 15.7 bits and h = 1 - a*x0, the quadratic
// iteration x1 = x0*(2 - a*x0) is evaluated as x1 = x0 + x0*h. h is kept on
// the bits below 2^-H_MSB, the product x0*h is truncated G guard bits below
// the output LSB and the sum is rounded to nearest.
//
// The iteration error is one-sided: x0*(1+h) = (1-h^2)/a never exceeds 1/a,
// and the truncations also only lower the sum. With the default seed the
// worst shortfall is about 2^-31.41 (0.75 ulp), found by evaluating every
// seed interval, plus 2 units of 2^-(W-1+G) for the truncations. BIAS, in
// units of 2^-(W-1+G), is half of that (25) and is added before rounding,
// which centres the error at +-0.39 ulp; with the final rounding the result
// is faithful: |y - 1/a| < 2^-(W-1). A different split needs BIAS
// recomputed the same way.
//
// Ports: a and y are (W, W-1) unsigned; a must have its integer bit set.
// Timing: one input per cycle; y valid LATENCY = 9 cycles after a, the
// latency reported for this operator (7 register stages plus output delay).
// The bipartite split (5,6,5 bits, 17 fraction bits) gives the published
// table sizes, 2048 x 18 and 1024 x 6. G = 6 and the bias are this design's
// choices.
module newton_recip
  import fxp_pkg::*;
#(
  parameter int W       = 32,
  parameter int G       = 6,
  parameter int BA      = 5,
  parameter int BB      = 6,
  parameter int BC      = 5,
  parameter int M       = 17,
  parameter int H_MSB   = 15,
  parameter int BIAS    = 25,
  parameter int LATENCY = 9
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] a,
  output logic         out_valid,
  output logic [W-1:0] y
);
  localparam int NATIVE = 7;
  localparam int XW = M + 1;
  localparam int FI = W - 1 + G;
  localparam int HW = FI - H_MSB + 1;

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

  logic [W+XW-1:0]      p3_q;   // stage 3: a*x0
  logic [XW-1:0]        x3_q;
  logic signed [HW-1:0] h4_q;   // stage 4: h
  logic [XW-1:0]        x4_q;
  logic signed [HW+1:0] q5_q;   // stage 5: x0*h
  logic [XW-1:0]        x5_q;
  logic signed [FI+2:0] r6_q;   // stage 6: x0 + x0*h
  logic [W-1:0]         y7_q;   // stage 7: rounded
  logic [NATIVE-3:0]    v_q;

  logic signed [W+XW:0]    h_full;
  logic signed [XW+HW:0]   q_full;
  logic signed [FI+2:0]    r_round;

  always_comb begin
    h_full  = (W+XW+1)'(1) <<< (W - 1 + M);
    h_full  = h_full - signed'({1'b0, p3_q});
    q_full  = signed'({1'b0, x4_q}) * h4_q;
    r_round = r6_q + (FI+3)'((1 <<< (G - 1)) + BIAS);
  end

  always_ff @(posedge clk) begin
    if (rst) v_q <= '0;
    else     v_q <= {v_q[NATIVE-4:0], bv};
    p3_q <= a2_q * x0_b;
    x3_q <= x0_b;
    h4_q <= HW'(h_full >>> (M - G));
    x4_q <= x3_q;
    q5_q <= (HW+2)'(q_full >>> M);
    x5_q <= x4_q;
    r6_q <= ((FI+3)'(x5_q) <<< (FI - M)) + (FI+3)'(q5_q);
    y7_q <= W'(r_round >>> G);
  end

  pipe_delay #(.W(W), .DEPTH(LATENCY - NATIVE)) u_out (
    .clk, .rst, .in_valid(v_q[NATIVE-3]), .in_data(y7_q),
    .out_valid, .out_data(y)
  );

  property p_h_fits;
    @(posedge clk) disable iff (rst)
      v_q[0] |-> ((h_full >>> (M - G)) == (W+XW+1)'(signed'(HW'(h_full >>> (M - G)))));
  endproperty
  a_h_fits: assert property (p_h_fits) else $error("newton_recip: |h| exceeds 2^-H_MSB");

  initial begin
    assert (LATENCY >= NATIVE) else $error("newton_recip: LATENCY below pipeline depth");
    assert (M >= G) else $error("newton_recip: M must be at least G");
  end
endmodule
