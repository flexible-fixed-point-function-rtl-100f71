// tb_holistic_table1: runs holistic_fn on every 16-bit format evaluated for
// it: 1/x and 1/sqrt(x) with f = 4 .. 15 fraction bits (24 instances).
//
// All instances receive every one of the 65536 inputs, one per cycle. Each
// output is checked against the exact function (saturated to 2^16-1 at and
// above the largest code, faithful elsewhere) and for its latency, which
// must be 2 for the underflow architectures, 6 for the polynomial with a
// plain table and 7 with a base+offset table. The chosen architecture,
// latency and memory-block estimate of each format are printed, and the
// run fails unless both underflow architectures, the polynomial, the
// base+offset table and the offset-indexed table each occur at least once.
module tb_holistic_table1;
  import fxp_pkg::*;
  localparam int W  = 16;
  localparam int NF = 12;          // f = 4 .. 15
  localparam int NI = 2 * NF;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic          in_valid = 1'b0;
  logic [W-1:0]  x = '0;
  logic [NI-1:0] ov;
  logic [W-1:0]  yv [NI];
  int            lat [NI], arch [NI], cost [NI], sb [NI];
  longint        tbase [NI];

  for (genvar j = 0; j < NI; j++) begin : g_inst
    localparam fn_e FN = (j < NF) ? FN_RECIP : FN_RSQRT;
    localparam int  FF = 4 + (j % NF);
    holistic_fn #(.FN(FN), .F(FF)) u (.clk, .rst, .in_valid, .x, .out_valid(ov[j]), .y(yv[j]));
    initial begin
      lat[j]   = u.LATENCY;
      arch[j]  = int'(u.ARCH);
      sb[j]    = u.SB;
      tbase[j] = u.TB;
      cost[j]  = (u.ARCH == 0) ? u.COST_A : ((u.ARCH == 1) ? u.COST_B : u.COST_POLY);
    end
  end

  int     checks = 0, failures = 0, sent = 0;
  int     got [NI];
  longint cyc = 0;
  logic [W-1:0] q_x [$];
  longint       q_t [$];

  function automatic bit ok(fn_e fn, int f, logic [W-1:0] xi, logic [W-1:0] yo);
    real ex;
    if (xi == 0) return yo == '1;
    ex = fn_eval(fn, real'(xi) / real'(1 << f)) * real'(1 << f);
    if (ex > 65535.0) return yo == '1;
    return (real'(yo) - ex < 1.0) && (ex - real'(yo) < 1.0);
  endfunction

  // inputs are recorded once; every instance looks them up by its latency
  logic [W-1:0] hist_x [64];
  logic         hist_v [64];
  always @(posedge clk) begin
    hist_x[cyc % 64] <= x;
    hist_v[cyc % 64] <= !rst && in_valid;
    for (int j = 0; j < NI; j++) begin
      if (!rst && ov[j]) begin
        logic [W-1:0] xi;
        fn_e          fn;
        fn = (j < NF) ? FN_RECIP : FN_RSQRT;
        xi = hist_x[(cyc - lat[j]) % 64];
        got[j]++;
        checks += 2;
        if (!hist_v[(cyc - lat[j]) % 64]) begin
          failures++;
          if (failures < 10) $display("inst %0d: result without input %0d cycles earlier", j, lat[j]);
        end
        if (!ok(fn, 4 + (j % NF), xi, yv[j])) begin
          failures++;
          if (failures < 20) $display("inst %0d x=%0d y=%0d wrong", j, xi, yv[j]);
        end
      end
    end
    cyc <= cyc + 1;
  end

  initial begin
    int n_ufa, n_ufb, n_poly, n_bo, n_off;
    n_ufa = 0; n_ufb = 0; n_poly = 0; n_bo = 0; n_off = 0;
    for (int j = 0; j < NI; j++) got[j] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int j = 0; j < NI; j++) begin
      int exp_lat;
      $display("%s (16,%0d): architecture %0d, base+offset sampling 2^%0d, table start %0d, %0d blocks, latency %0d",
               (j < NF) ? "1/x      " : "1/sqrt(x)", 4 + (j % NF), arch[j], sb[j], tbase[j], cost[j], lat[j]);
      exp_lat = (arch[j] != 2) ? 2 : ((sb[j] == 0) ? 6 : 7);
      checks++;
      if (lat[j] != exp_lat) begin
        failures++;
        $display("inst %0d: latency %0d, expected %0d", j, lat[j], exp_lat);
      end
      if (arch[j] == 0) n_ufa++;
      if (arch[j] == 1) n_ufb++;
      if (arch[j] == 2) n_poly++;
      if (arch[j] == 2 && sb[j] != 0) n_bo++;
      if (arch[j] == 2 && tbase[j] != 0) n_off++;
    end
    for (int i = 0; i < (1 << W); i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      x = W'(i);
      sent++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    for (int j = 0; j < NI; j++) begin
      checks++;
      if (got[j] != sent) begin
        failures++;
        $display("inst %0d: sent %0d results %0d", j, sent, got[j]);
      end
    end
    $display("architectures: underflow(a) %0d, underflow(b) %0d, polynomial %0d (base+offset %0d, offset-indexed %0d)",
             n_ufa, n_ufb, n_poly, n_bo, n_off);
    checks++;
    if (n_ufa == 0 || n_ufb == 0 || n_poly == 0 || n_bo == 0 || n_off == 0) begin
      failures++;
      $display("an architecture variant never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
