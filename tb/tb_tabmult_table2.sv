// tb_tabmult_table2: runs the tabulate-and-multiply operators on every
// [1,2) configuration evaluated for them:
//   first order,  1/x:        (19,18) m=9, (21,20) m=10, (23,22) m=11, (24,23) m=12
//   second order, 1/x:        (21,20) m=7, (23,22) m=7,  (24,23) m=8
//   second order, 1/sqrt(x):  (24,23) m=8
//   second order, sqrt(x):    (24,23) m=8
// Each instance gets both ends of every table segment and random inputs, one
// per cycle with gaps, and every output is checked for faithfulness in
// integer arithmetic and for its latency (4 for the first order; 5, 9 and 8
// for the second order).
module tb_tabmult_table2;
  import fxp_pkg::*;
  import fxp_check_pkg::*;
  localparam int NI = 9;
  localparam int ORD [NI] = '{1, 1, 1, 1, 2, 2, 2, 2, 2};
  localparam int WS  [NI] = '{19, 21, 23, 24, 21, 23, 24, 24, 24};
  localparam int MS  [NI] = '{9, 10, 11, 12, 7, 7, 8, 8, 8};
  localparam fn_e FNS [NI] = '{FN_RECIP, FN_RECIP, FN_RECIP, FN_RECIP, FN_RECIP, FN_RECIP,
                               FN_RECIP, FN_RSQRT, FN_SQRT};
  localparam int LAT [NI] = '{4, 4, 4, 4, 5, 5, 5, 9, 8};
  localparam int N = 60000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks [NI];
  int failures [NI];
  bit done [NI];

  for (genvar j = 0; j < NI; j++) begin : g_inst
    localparam int W = WS[j];
    logic         iv = 1'b0;
    logic [W-1:0] x = '0;
    logic         ov;
    logic [W-1:0] y;
    if (ORD[j] == 1) begin : g_o1
      tabmult1 #(.FN(FNS[j]), .W(W), .M(MS[j])) u (.clk, .rst, .in_valid(iv), .x, .out_valid(ov), .y);
    end else begin : g_o2
      tabmult2 #(.FN(FNS[j]), .W(W), .M(MS[j])) u (.clk, .rst, .in_valid(iv), .x, .out_valid(ov), .y);
    end

    longint       cyc = 0;
    int           sent = 0, got = 0;
    logic [W-1:0] q_x [$];
    longint       q_t [$];

    always @(posedge clk) begin
      if (!rst && iv) begin
        q_x.push_back(x);
        q_t.push_back(cyc);
      end
      if (!rst && ov) begin
        logic [W-1:0] xi;
        longint       t;
        xi = q_x.pop_front();
        t  = q_t.pop_front();
        got++;
        checks[j] += 2;
        if (cyc - t != LAT[j]) failures[j]++;
        if (!faithful(FNS[j], W, 64'(xi), 64'(y))) begin
          failures[j]++;
          if (failures[j] < 5) $display("config %0d x=%h y=%h not faithful", j, xi, y);
        end
      end
      cyc <= cyc + 1;
    end

    initial begin
      checks[j] = 0;
      failures[j] = 0;
      done[j] = 1'b0;
      repeat (3) @(negedge clk);
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        iv = ($urandom_range(0, 7) != 0);
        if (i < (2 << MS[j]))
          x = W'({1'b1, (W-1)'(i >> 1) << (W - 1 - MS[j])}) | (i[0] ? W'((1 << (W - 1 - MS[j])) - 1) : '0);
        else
          x = {1'b1, (W-1)'($urandom())};
        if (iv) sent++;
      end
      @(negedge clk);
      iv = 1'b0;
      repeat (20) @(negedge clk);
      checks[j]++;
      if (got != sent || sent == 0) failures[j]++;
      done[j] = 1'b1;
    end
  end

  initial begin
    int c, f;
    #20;
    rst = 1'b0;
    wait (done.and() == 1'b1);
    c = 0;
    f = 0;
    for (int j = 0; j < NI; j++) begin
      $display("order %0d fn %0d (%0d,%0d) m=%0d: %0d checks, %0d failures",
               ORD[j], FNS[j], WS[j], WS[j] - 1, MS[j], checks[j], failures[j]);
      c += checks[j];
      f += failures[j];
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    int c, f;
    repeat (N + 2000) @(posedge clk);
    c = 0;
    f = 1;
    for (int j = 0; j < NI; j++) begin
      c += checks[j];
      f += failures[j];
    end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
