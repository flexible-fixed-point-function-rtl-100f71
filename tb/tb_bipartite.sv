// tb_bipartite: self-checking testbench for bipartite.
//
// Two instances with the default split (3,5,3 bits, 12 fraction bits), one
// for 1/x and one for 1/sqrt(x), see every combination of the 11 address bits
// with all-zero, all-one and random lower bits, one input per cycle. Each
// output must be within 2^-10.75 (1/x) or 2^-11.4 (1/sqrt(x)) of the exact
// value, the accuracy the cubic iterations are designed for, and arrive
// exactly 2 cycles after its input.
module tb_bipartite;
  import fxp_pkg::*;
  localparam int W    = 32;
  localparam int OUTF = 12;
  localparam int NA   = 11;          // A+B+C
  localparam int N    = 1 << NA;
  localparam int LAT  = 2;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic          in_valid = 1'b0;
  logic [W-1:0]  x = '0;
  logic [1:0]    ov;
  logic [OUTF:0] yv [2];

  bipartite #(.FN(FN_RECIP)) u_r (.clk, .rst, .in_valid, .x, .out_valid(ov[0]), .y(yv[0]));
  bipartite #(.FN(FN_RSQRT)) u_s (.clk, .rst, .in_valid, .x, .out_valid(ov[1]), .y(yv[1]));

  int     checks = 0, failures = 0, sent = 0;
  int     got [2] = '{0, 0};
  real    worst [2] = '{0.0, 0.0};
  longint cyc = 0;
  logic [W-1:0] q_x [2][$];
  longint       q_t [2][$];
  fn_e          fns [2] = '{FN_RECIP, FN_RSQRT};

  always @(posedge clk) begin
    for (int k = 0; k < 2; k++) begin
      if (!rst && in_valid) begin
        q_x[k].push_back(x);
        q_t[k].push_back(cyc);
      end
      if (!rst && ov[k]) begin
        logic [W-1:0] xi;
        longint       t;
        real          err;
        xi  = q_x[k].pop_front();
        t   = q_t[k].pop_front();
        got[k]++;
        checks += 2;
        if (cyc - t != LAT) begin
          failures++;
          $display("fn %0d latency %0d", k, cyc - t);
        end
        err = real'(yv[k]) / real'(1 << OUTF) - fn_eval(fns[k], real'(xi) / (2.0 ** (W - 1)));
        if (err < 0.0) err = -err;
        if (err > worst[k]) worst[k] = err;
        if (err >= ((k == 0) ? 2.0 ** -10.75 : 2.0 ** -11.4)) begin
          failures++;
          if (failures < 10) $display("fn %0d x=%h y=%h error %e", k, xi, yv[k], err);
        end
      end
    end
    cyc <= cyc + 1;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 3 * N; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      case (i / N)
        0:       x = {1'b1, NA'(i), (W-1-NA)'(0)};
        1:       x = {1'b1, NA'(i), {(W-1-NA){1'b1}}};
        default: x = {1'b1, NA'(i), (W-1-NA)'($urandom())};
      endcase
      sent++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (got[k] != sent) begin
        failures++;
        $display("fn %0d: sent %0d results %0d", k, sent, got[k]);
      end
      $display("fn %0d: worst error 2^%0.2f", k, $ln(worst[k]) / $ln(2.0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
