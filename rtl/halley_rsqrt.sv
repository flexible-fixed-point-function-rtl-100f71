// halley_rsqrt: 32-bit fixed-point reciprocal square root 1/sqrt(a) for a in
// [1,2), by one cubically convergent iteration started from a bipartite
// approximation.
//
// With x0 ~ 1/sqrt(a) and h = 1 - a*x0^2, the iteration is
//     x1 = x0*(8 + h*(4 + 3h))/8 = x0 + x0*(4h + 3h^2)/8.
// x0 (about 11.5 bits accurate) is squared exactly, multiplied by a, and h is
// kept on the few bits below 2^-H_MSB. h^2, the correction 4h + 3h^2 and its
// product with x0 are truncated to G guard bits below the output LSB; the
// division by 8 is a shift. The final sum is rounded to nearest and is
// faithful: |y - 1/sqrt(a)| < 2^-(W-1).
//
// Ports: a and y are (W, W-1) unsigned; a must have its integer bit set.
// Timing: one input per cycle; y is valid LATENCY = 19 cycles after a, the
// latency reported for this operator. The datapath has 10 register stages;
// the rest is output delay. The bipartite split (3,5,3 bits, 12 fraction
// bits) is the one of the reciprocal (x0 on 13 bits, as published); the
// worst iteration error is 2^-33.0 (0.24 ulp). G = 6 is this design's
// choice. The two tables are kept separate rather than packed into one
// dual-port memory.
module halley_rsqrt
  import fxp_pkg::*;
#(
  parameter int W       = 32,
  parameter int G       = 6,
  parameter int BA      = 3,
  parameter int BB      = 5,
  parameter int BC      = 3,
  parameter int M       = 12,
  parameter int H_MSB   = 10,
  parameter int LATENCY = 19
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] a,
  output logic         out_valid,
  output logic [W-1:0] y
);
  localparam int NATIVE = 10;
  localparam int XW = M + 1;
  localparam int FI = W - 1 + G;
  localparam int HW = FI - H_MSB + 1;

  // ---- stages 1-2: bipartite
  logic          bv;
  logic [XW-1:0] x0_b;
  bipartite #(.FN(FN_RSQRT), .WIN(W), .A(BA), .B(BB), .C(BC), .OUTF(M)) u_bip (
    .clk, .rst, .in_valid, .x(a), .out_valid(bv), .y(x0_b)
  );
  logic [W-1:0] a1_q, a2_q, a3_q;
  always_ff @(posedge clk) begin
    a1_q <= a;
    a2_q <= a1_q;
    a3_q <= a2_q;
  end

  logic [2*XW-1:0]      sq3_q;   // stage 3: x0^2, 2M fraction bits
  logic [XW-1:0]        x3_q;
  logic [W+2*XW-1:0]    p4_q;    // stage 4: a*x0^2
  logic [XW-1:0]        x4_q;
  logic signed [HW-1:0] h5_q;    // stage 5: h
  logic [XW-1:0]        x5_q;
  logic signed [HW-1:0] h6_q, hh6_q;  // stage 6: h^2
  logic [XW-1:0]        x6_q;
  logic signed [HW+2:0] t7_q;    // stage 7: 4h + 3h^2
  logic [XW-1:0]        x7_q;
  logic signed [HW+3:0] q8_q;    // stage 8: x0*t/8
  logic [XW-1:0]        x8_q;
  logic signed [FI+2:0] r9_q;    // stage 9: x0 + q
  logic [W-1:0]         y10_q;   // stage 10: rounded
  logic [NATIVE-3:0]    v_q;

  logic signed [W+2*XW:0]   h_full;
  logic signed [2*HW-1:0]   hh_full;
  logic signed [XW+HW+3:0]  q_full;
  logic signed [FI+2:0]     r_round;

  always_comb begin
    h_full  = (W+2*XW+1)'(1) <<< (W - 1 + 2*M);
    h_full  = h_full - signed'({1'b0, p4_q});
    hh_full = h5_q * h5_q;
    q_full  = signed'({1'b0, x7_q}) * t7_q;
    r_round = r9_q + (FI+3)'(1 <<< (G - 1));
  end

  always_ff @(posedge clk) begin
    if (rst) v_q <= '0;
    else     v_q <= {v_q[NATIVE-4:0], bv};
    sq3_q <= x0_b * x0_b;
    x3_q  <= x0_b;
    p4_q  <= a3_q * sq3_q;
    x4_q  <= x3_q;
    h5_q  <= HW'(h_full >>> (2*M - G));
    x5_q  <= x4_q;
    h6_q  <= h5_q;
    hh6_q <= HW'(hh_full >>> FI);
    x6_q  <= x5_q;
    t7_q  <= ((HW+3)'(h6_q) <<< 2) + 3 * (HW+3)'(hh6_q);
    x7_q  <= x6_q;
    q8_q  <= (HW+4)'(q_full >>> (M + 3));
    x8_q  <= x7_q;
    r9_q  <= ((FI+3)'(x8_q) <<< (FI - M)) + (FI+3)'(q8_q);
    y10_q <= W'(r_round >>> G);
  end

  pipe_delay #(.W(W), .DEPTH(LATENCY - NATIVE)) u_out (
    .clk, .rst, .in_valid(v_q[NATIVE-3]), .in_data(y10_q),
    .out_valid, .out_data(y)
  );

  property p_h_fits;
    @(posedge clk) disable iff (rst)
      v_q[1] |-> ((h_full >>> (2*M - G)) == (W+2*XW+1)'(signed'(HW'(h_full >>> (2*M - G)))));
  endproperty
  a_h_fits: assert property (p_h_fits) else $error("halley_rsqrt: |h| exceeds 2^-H_MSB");

  initial begin
    assert (LATENCY >= NATIVE) else $error("halley_rsqrt: LATENCY below pipeline depth");
    assert (2*M >= G) else $error("halley_rsqrt: 2M must be at least G");
  end
endmodule
