// tb_fxp_funcgen_top: end-to-end testbench of fxp_funcgen_top at its default
// sizes (no parameter is overridden).
//
// All nine operators are driven at once, each with its own random valid
// pattern and random inputs in its own format (plus corner values: x = 0,
// the smallest inputs and the interval ends). Every result is checked for
// faithfulness against the exact function and for its latency
// (6, 6, 4, 5, 9, 8, 9, 11, 19 cycles). The test also counts how often
// each mechanism of the holistic operators was used (saturation, the
// tabulated range, the polynomial range) and how often the iterations saw
// a negative and a positive correction term h, and fails if any count is 0.
module tb_fxp_funcgen_top;
  import fxp_pkg::*;
  import fxp_check_pkg::*;
  localparam int NOP = 9;
  localparam int N   = 40000;
  localparam int WID [NOP] = '{16, 16, 21, 24, 24, 24, 32, 32, 32};
  localparam int LAT [NOP] = '{6, 6, 4, 5, 9, 8, 9, 11, 19};
  localparam fn_e FNS [NOP] = '{FN_RECIP, FN_RSQRT, FN_RECIP, FN_RECIP, FN_RSQRT, FN_SQRT,
                                FN_RECIP, FN_RECIP, FN_RSQRT};
  localparam int HOL_F = 8;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [NOP-1:0] iv = '0;
  logic [NOP-1:0] ov;
  logic [31:0]    xin [NOP];
  logic [31:0]    yout [NOP];
  logic [15:0]    yn0, yn1;
  logic [20:0]    yn2;
  logic [23:0]    yn3, yn4, yn5;

  initial for (int k = 0; k < NOP; k++) xin[k] = '0;

  fxp_funcgen_top dut (
    .clk, .rst,
    .hol_recip_in_valid(iv[0]), .hol_recip_x(xin[0][15:0]), .hol_recip_out_valid(ov[0]), .hol_recip_y(yn0),
    .hol_rsqrt_in_valid(iv[1]), .hol_rsqrt_x(xin[1][15:0]), .hol_rsqrt_out_valid(ov[1]), .hol_rsqrt_y(yn1),
    .tm1_recip_in_valid(iv[2]), .tm1_recip_x(xin[2][20:0]), .tm1_recip_out_valid(ov[2]), .tm1_recip_y(yn2),
    .tm2_recip_in_valid(iv[3]), .tm2_recip_x(xin[3][23:0]), .tm2_recip_out_valid(ov[3]), .tm2_recip_y(yn3),
    .tm2_rsqrt_in_valid(iv[4]), .tm2_rsqrt_x(xin[4][23:0]), .tm2_rsqrt_out_valid(ov[4]), .tm2_rsqrt_y(yn4),
    .tm2_sqrt_in_valid(iv[5]),  .tm2_sqrt_x(xin[5][23:0]),  .tm2_sqrt_out_valid(ov[5]),  .tm2_sqrt_y(yn5),
    .nr_recip_in_valid(iv[6]),  .nr_recip_x(xin[6]),        .nr_recip_out_valid(ov[6]),  .nr_recip_y(yout[6]),
    .hal_recip_in_valid(iv[7]), .hal_recip_x(xin[7]),       .hal_recip_out_valid(ov[7]), .hal_recip_y(yout[7]),
    .hal_rsqrt_in_valid(iv[8]), .hal_rsqrt_x(xin[8]),       .hal_rsqrt_out_valid(ov[8]), .hal_rsqrt_y(yout[8])
  );
  always_comb begin
    yout[0] = 32'(yn0);
    yout[1] = 32'(yn1);
    yout[2] = 32'(yn2);
    yout[3] = 32'(yn3);
    yout[4] = 32'(yn4);
    yout[5] = 32'(yn5);
  end

  int     checks = 0, failures = 0;
  int     sent [NOP], got [NOP];
  int     n_sat = 0, n_tab = 0, n_poly = 0, n_hneg = 0, n_hpos = 0;
  longint cyc = 0;
  logic [31:0] q_x [NOP][$];
  longint      q_t [NOP][$];

  function automatic bit hol_ok(fn_e fn, logic [15:0] xi, logic [15:0] yo);
    real ex;
    if (xi == 0) return yo == 16'hffff;
    ex = fn_eval(fn, real'(xi) / 256.0) * 256.0;
    if (ex > 65535.0) return yo == 16'hffff;
    return (real'(yo) - ex < 1.0) && (ex - real'(yo) < 1.0);
  endfunction

  always @(posedge clk) begin
    for (int k = 0; k < NOP; k++) begin
      if (!rst && iv[k]) begin
        q_x[k].push_back(xin[k]);
        q_t[k].push_back(cyc);
      end
      if (!rst && ov[k]) begin
        logic [31:0] xi;
        longint      t;
        bit          good;
        xi = q_x[k].pop_front();
        t  = q_t[k].pop_front();
        got[k]++;
        checks += 2;
        if (cyc - t != LAT[k]) begin
          failures++;
          $display("op %0d latency %0d, expected %0d", k, cyc - t, LAT[k]);
        end
        if (k < 2) good = hol_ok(FNS[k], xi[15:0], yout[k][15:0]);
        else       good = faithful(FNS[k], WID[k], 64'(xi), 64'(yout[k]));
        if (!good) begin
          failures++;
          if (failures < 20) $display("op %0d x=%h y=%h wrong", k, xi, yout[k]);
        end
      end
    end
    // mechanism counters
    if (!rst && iv[0]) begin
      if (xin[0][15:0] < 16'(dut.u_hol_recip.ISAT)) n_sat++;
      else if (32'(xin[0][15:0]) < 32'(dut.u_hol_recip.ITAB)) n_tab++;
      else n_poly++;
    end
    if (!rst && dut.u_hal_recip.v_q[1]) begin
      if (dut.u_hal_recip.h4_q < 0) n_hneg++;
      else                          n_hpos++;
    end
    cyc <= cyc + 1;
  end

  function automatic logic [31:0] stim(int k, int i);
    logic [31:0] r;
    r = $urandom();
    if (k < 2) begin
      // holistic: small inputs often, to reach saturation and the table
      case (i % 4)
        0:       return 32'(i % 16);
        1:       return 32'(r % 2048);
        default: return 32'(r[15:0]);
      endcase
    end
    if (i == 0) return 32'(1) << (WID[k] - 1);           // 1.0
    if (i == 1) return (32'(1) << WID[k]) - 1;             // just below 2
    return (32'(1) << (WID[k] - 1)) | (r & ((32'(1) << (WID[k] - 1)) - 1));
  endfunction

  initial begin
    for (int k = 0; k < NOP; k++) begin
      sent[k] = 0;
      got[k]  = 0;
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      for (int k = 0; k < NOP; k++) begin
        iv[k]  = (i < 2) || ($urandom_range(0, 5) != 0);
        xin[k] = stim(k, i);
        if (iv[k]) sent[k]++;
      end
    end
    @(negedge clk);
    iv = '0;
    repeat (30) @(negedge clk);
    for (int k = 0; k < NOP; k++) begin
      checks++;
      if (got[k] != sent[k] || sent[k] == 0) begin
        failures++;
        $display("op %0d: sent %0d results %0d", k, sent[k], got[k]);
      end
    end
    $display("holistic 1/x: saturated %0d, tabulated %0d, polynomial %0d", n_sat, n_tab, n_poly);
    $display("Halley 1/x: h < 0 %0d times, h >= 0 %0d times", n_hneg, n_hpos);
    checks++;
    if (n_sat == 0 || n_tab == 0 || n_poly == 0 || n_hneg == 0 || n_hpos == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
