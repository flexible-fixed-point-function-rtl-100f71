// tb_newton_recip: self-checking testbench for newton_recip.
//
// Streams corner values and random inputs a in [1,2), one per cycle, with
// gaps, and checks every result against the exact reciprocal using integer
// arithmetic: y is faithful when |y*a - 2^(2(W-1))| < a, i.e. |y - 1/a| is
// below one unit in the last place. Each result must appear exactly
// LAT = 9 cycles after its input.
module tb_newton_recip;
  localparam int W   = 32;
  localparam int LAT = 9;
  localparam int N   = 200000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic         in_valid = 1'b0;
  logic [W-1:0] a = '0;
  logic         out_valid;
  logic [W-1:0] y;

  newton_recip dut (.clk, .rst, .in_valid, .a, .out_valid, .y);

  int     checks = 0, failures = 0, sent = 0, got = 0;
  longint cyc = 0;
  logic [W-1:0] q_a [$];
  longint       q_t [$];

  always @(posedge clk) begin
    if (!rst && in_valid) begin
      q_a.push_back(a);
      q_t.push_back(cyc);
    end
    if (!rst && out_valid) begin
      logic [W-1:0]   ai;
      longint         t;
      logic [127:0]   prod, one, diff;
      ai = q_a.pop_front();
      t  = q_t.pop_front();
      got++;
      checks++;
      if (cyc - t != LAT) begin
        failures++;
        $display("latency %0d, expected %0d", cyc - t, LAT);
      end
      prod = 128'(y) * 128'(ai);
      one  = 128'(1) << (2 * (W - 1));
      diff = (prod > one) ? prod - one : one - prod;
      checks++;
      if (diff >= 128'(ai)) begin
        failures++;
        if (failures < 10) $display("a=%h y=%h not faithful", ai, y);
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
      if (i < 4)       a = {1'b1, (W-1)'(0)} + W'(i);
      else if (i < 8)  a = {W{1'b1}} - W'(i - 4);
      else             a = {1'b1, (W-1)'($urandom())};
      if (in_valid) sent++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (got != sent || sent == 0) begin
      failures++;
      $display("sent %0d results %0d", sent, got);
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
