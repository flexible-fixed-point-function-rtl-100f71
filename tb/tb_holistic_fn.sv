// tb_holistic_fn: self-checking testbench for holistic_fn.
//
// Seven 16-bit instances, 1/x in formats (16,4), (16,5), (16,8), (16,12),
// (16,15) and 1/sqrt(x) in (16,4), (16,8), are fed every one of the 65536
// inputs, one per cycle with random gaps. Each output is compared with the
// exact function computed in real arithmetic: x = 0 and values at or above
// 2^16-1 ulps must give 2^16-1, all others must be within one ulp.
// Each result must arrive exactly at the instance's latency. The test also
// checks the architecture chosen for the formats where it is known
// (16,4): whole-range underflow table, (16,5): table plus 1-ulp region,
// (16,8), (16,12), (16,15): polynomial), and that the saturation, table,
// polynomial, 1-ulp and zero regions were each exercised.
module tb_holistic_fn;
  import fxp_pkg::*;
  localparam int W  = 16;
  localparam int NI = 7;
  localparam fn_e FNS [NI] = '{FN_RECIP, FN_RECIP, FN_RECIP, FN_RECIP, FN_RECIP, FN_RSQRT, FN_RSQRT};
  localparam int  FS  [NI] = '{4, 5, 8, 12, 15, 4, 8};
  // expected architecture: 0 = UF_A, 1 = UF_B, 2 = POLY, -1 = not checked
  localparam int  EXP_ARCH [NI] = '{0, 1, 2, 2, 2, -1, -1};

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic         in_valid = 1'b0;
  logic [W-1:0] x = '0;
  logic [NI-1:0] ov;
  logic [W-1:0]  yv [NI];
  int            lat [NI];
  int            arch [NI];

  holistic_fn #(.FN(FN_RECIP), .F(4))  u0 (.clk, .rst, .in_valid, .x, .out_valid(ov[0]), .y(yv[0]));
  holistic_fn #(.FN(FN_RECIP), .F(5))  u1 (.clk, .rst, .in_valid, .x, .out_valid(ov[1]), .y(yv[1]));
  holistic_fn #(.FN(FN_RECIP), .F(8))  u2 (.clk, .rst, .in_valid, .x, .out_valid(ov[2]), .y(yv[2]));
  holistic_fn #(.FN(FN_RECIP), .F(12)) u3 (.clk, .rst, .in_valid, .x, .out_valid(ov[3]), .y(yv[3]));
  holistic_fn #(.FN(FN_RECIP), .F(15)) u4 (.clk, .rst, .in_valid, .x, .out_valid(ov[4]), .y(yv[4]));
  holistic_fn #(.FN(FN_RSQRT), .F(4))  u5 (.clk, .rst, .in_valid, .x, .out_valid(ov[5]), .y(yv[5]));
  holistic_fn #(.FN(FN_RSQRT), .F(8))  u6 (.clk, .rst, .in_valid, .x, .out_valid(ov[6]), .y(yv[6]));

  initial begin
    lat  = '{u0.LATENCY, u1.LATENCY, u2.LATENCY, u3.LATENCY, u4.LATENCY, u5.LATENCY, u6.LATENCY};
    arch = '{int'(u0.ARCH), int'(u1.ARCH), int'(u2.ARCH), int'(u3.ARCH), int'(u4.ARCH),
             int'(u5.ARCH), int'(u6.ARCH)};
  end

  int     checks = 0, failures = 0, sent = 0;
  int     got [NI];
  int     n_sat = 0, n_zero = 0, n_one = 0, n_mid = 0;
  longint cyc = 0;
  logic [W-1:0] q_x [NI][$];
  longint       q_t [NI][$];

  function automatic bit ok(fn_e fn, int f, logic [W-1:0] xi, logic [W-1:0] yo);
    real ex, mx;
    mx = real'((1 << W) - 1);
    if (xi == 0) return yo == W'((1 << W) - 1);
    ex = fn_eval(fn, real'(xi) / real'(1 << f)) * real'(1 << f);
    if (ex > mx) return yo == W'((1 << W) - 1);
    return (real'(yo) - ex < 1.0) && (ex - real'(yo) < 1.0);
  endfunction

  always @(posedge clk) begin
    for (int k = 0; k < NI; k++) begin
      if (!rst && in_valid) begin
        q_x[k].push_back(x);
        q_t[k].push_back(cyc);
      end
      if (!rst && ov[k]) begin
        logic [W-1:0] xi;
        longint       t;
        xi = q_x[k].pop_front();
        t  = q_t[k].pop_front();
        got[k]++;
        checks += 2;
        if (cyc - t != longint'(lat[k])) begin
          failures++;
          $display("inst %0d latency %0d, expected %0d", k, cyc - t, lat[k]);
        end
        if (!ok(FNS[k], FS[k], xi, yv[k])) begin
          failures++;
          if (failures < 20) $display("inst %0d x=%0d y=%0d wrong", k, xi, yv[k]);
        end
        if (yv[k] == '1)      n_sat++;
        else if (yv[k] == 0)  n_zero++;
        else if (yv[k] == 1)  n_one++;
        else                  n_mid++;
      end
    end
    cyc <= cyc + 1;
  end

  int n_tab_hits = 0, n_poly_hits = 0;
  // Region coverage of the polynomial instances, from their input ranges.
  always @(posedge clk) begin
    if (!rst && in_valid) begin
      if (longint'(x) >= u2.T_LO && longint'(x) < u2.T_HI) n_tab_hits++;
      if (longint'(x) >= u2.ITAB) n_poly_hits++;
    end
  end

  initial begin
    for (int k = 0; k < NI; k++) got[k] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < NI; k++) begin
      $display("inst %0d: fn %0d f %0d arch %0d latency %0d", k, FNS[k], FS[k], arch[k], lat[k]);
      checks++;
      if (EXP_ARCH[k] >= 0 && arch[k] != EXP_ARCH[k]) begin
        failures++;
        $display("inst %0d: architecture %0d, expected %0d", k, arch[k], EXP_ARCH[k]);
      end
    end
    for (int i = 0; i < (1 << W); ) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 9) != 0);
      x = W'(i);
      if (in_valid) begin
        sent++;
        i++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    for (int k = 0; k < NI; k++) begin
      checks++;
      if (got[k] != sent) begin
        failures++;
        $display("inst %0d: sent %0d results %0d", k, sent, got[k]);
      end
    end
    $display("outputs: saturated %0d, zero %0d, one ulp %0d, other %0d; table %0d poly %0d",
             n_sat, n_zero, n_one, n_mid, n_tab_hits, n_poly_hits);
    checks++;
    if (n_sat == 0 || n_zero == 0 || n_one == 0 || n_tab_hits == 0 || n_poly_hits == 0) begin
      failures++;
      $display("a region was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
