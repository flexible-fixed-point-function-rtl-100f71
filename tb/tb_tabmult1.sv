// tb_tabmult1: self-checking testbench for tabmult1.
//
// Three instances at the default width (W = 21), one per function, are fed
// the same stream of inputs in [1,2): the interval ends, every table segment
// boundary and random values, one per cycle with random gaps. Each output is
// checked for faithfulness against the exact function in integer arithmetic
// and must arrive exactly at the function's latency (4 cycles).
module tb_tabmult1;
  import fxp_pkg::*;
  import fxp_check_pkg::*;
  localparam int W = 21;
  localparam int N = 300000;
  localparam int LAT [3] = '{4, 4, 4};

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic         in_valid = 1'b0;
  logic [W-1:0] x = '0;
  logic [2:0]   ov;
  logic [W-1:0] yv [3];

  tabmult1 #(.FN(FN_RECIP)) u_recip (.clk, .rst, .in_valid, .x, .out_valid(ov[0]), .y(yv[0]));
  tabmult1 #(.FN(FN_RSQRT)) u_rsqrt (.clk, .rst, .in_valid, .x, .out_valid(ov[1]), .y(yv[1]));
  tabmult1 #(.FN(FN_SQRT))  u_sqrt  (.clk, .rst, .in_valid, .x, .out_valid(ov[2]), .y(yv[2]));

  int     checks = 0, failures = 0, sent = 0;
  int     got [3] = '{0, 0, 0};
  longint cyc = 0;
  logic [W-1:0] q_x [3][$];
  longint       q_t [3][$];
  fn_e          fns [3] = '{FN_RECIP, FN_RSQRT, FN_SQRT};

  always @(posedge clk) begin
    for (int k = 0; k < 3; k++) begin
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
        if (cyc - t != LAT[k]) begin
          failures++;
          $display("fn %0d latency %0d, expected %0d", k, cyc - t, LAT[k]);
        end
        if (!faithful(fns[k], W, 64'(xi), 64'(yv[k]))) begin
          failures++;
          if (failures < 10) $display("fn %0d x=%h y=%h not faithful", k, xi, yv[k]);
        end
      end
    end
    cyc <= cyc + 1;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      if (i < 2048)     // both ends of every one of the 1024 segments
        x = {1'b1, 10'(i >> 1), {(W-11){i[0]}}};
      else
        x = {1'b1, (W-1)'($urandom())};
      if (in_valid) sent++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (got[k] != sent || sent == 0) begin
        failures++;
        $display("fn %0d: sent %0d results %0d", k, sent, got[k]);
      end
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
