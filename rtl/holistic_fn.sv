// holistic_fn: full-range fixed-point 1/x or 1/sqrt(x) for an arbitrary
// unsigned (W, F) input/output format, without range reduction.
//
// Instead of normalising x to [1,2), computing there and shifting back, the
// whole input range of the given format is handled at once. At elaboration
// the module evaluates the function on the format and picks, among three
// architectures, the one needing the fewest 10 Kbit memory blocks:
//
//   ARCH_UF_A  underflow-heavy formats: a table for every input below idx0,
//              the first input from which 0 is a faithful result; 0 above.
//   ARCH_UF_B  a table below idx1 (first input from which 1 ulp is
//              faithful), a constant 1 ulp in [idx1, idx0), 0 above.
//   ARCH_POLY  the input word is cut into 2^K equal segments by its top K
//              bits. Every segment from s_tab up is evaluated with a
//              first-degree minimax polynomial y = c0 - c1*offset (c1 is the
//              magnitude of the falling slope). Segments below s_tab, where
//              the polynomial is not accurate enough, are tabulated; the
//              saturated inputs at the bottom are either detected by a
//              comparator or folded into the table, whichever uses fewer
//              blocks, and the table is stored either plainly or as
//              base + offset (a sampled base table plus a narrow table of
//              differences), again whichever uses fewer blocks. K is chosen
//              by the same memory-block count.
//
// Output: y = x^P rounded to F fraction bits, saturated to 2^W-1 (also for
// x = 0), faithful everywhere: |y - x^P| < 2^-F where not saturated.
// Ties between architectures go to UF_A, then UF_B, then POLY.
//
// Ports: x and y are W-bit unsigned with F fraction bits.
// Timing: one input per cycle, y valid LATENCY cycles after x; LATENCY is
// derived from the architecture: 2 for the underflow architectures, 6 for
// POLY with a plain table, 7 with a base+offset table. The polynomial path
// has 4 register stages (table/coefficient read, product, sum, rounding and
// selection); the rest is output delay.
module holistic_fn
  import fxp_pkg::*;
#(
  parameter fn_e FN = FN_RECIP,
  parameter int  W  = 16,
  parameter int  F  = 8,
  parameter int  GB = 6          // guard bits of the polynomial datapath
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] x,
  output logic         out_valid,
  output logic [W-1:0] y
);
  typedef enum int {ARCH_UF_A = 0, ARCH_UF_B = 1, ARCH_POLY = 2} arch_e;

  localparam longint NIN  = 64'd1 << W;
  localparam longint MAXV = (64'd1 << W) - 1;

  // ---------------------------------------------------------------- analysis
  // Exact value at input index i, in output ulps.
  function automatic real g(longint i);
    return fn_eval(FN, real'(i) * $pow(2.0, -F)) * $pow(2.0, F);
  endfunction

  // Round-to-nearest output, saturated.
  function automatic longint rn(longint i);
    real v;
    if (i == 0) return MAXV;
    v = g(i);
    if (v >= real'(MAXV)) return MAXV;
    return rnd(v);
  endfunction

  // Smallest i in [1, NIN] with g(i) < thr (NIN if none); g is decreasing.
  function automatic longint first_below(real thr);
    longint lo, hi, mid;
    lo = 1;
    hi = NIN;
    while (lo < hi) begin
      mid = (lo + hi) / 2;
      if (g(mid) < thr) hi = mid;
      else              lo = mid + 1;
    end
    return lo;
  endfunction

  localparam longint IDX0 = first_below(1.0);
  localparam longint IDX1 = first_below(2.0);
  localparam longint ISAT = first_below(real'(MAXV) - 0.5);

  // Linear minimax fit of segment s of 2^(W-k) inputs. sel = 0 returns the
  // max error in ulps, sel = 1 the intercept c0, sel = 2 the slope magnitude
  // c1 (ulps per input step).
  function automatic real seg_fit(int k, longint s, int sel);
    longint sz, a, b;
    real    ga, gb, m, xi, d;
    sz = 64'd1 << (W - k);
    a  = s * sz;
    b  = a + sz - 1;
    ga = g(a);
    gb = g(b);
    m  = (gb - ga) / real'(sz - 1);
    if (FN == FN_RECIP) xi = $sqrt(-1.0 / m) * $pow(2.0, F);
    else                xi = $pow(-2.0 * m, -2.0 / 3.0) * $pow(2.0, F);
    if (xi < real'(a)) xi = real'(a);
    if (xi > real'(b)) xi = real'(b);
    d  = ga + m * (xi - real'(a)) - fn_eval(FN, xi * $pow(2.0, -F)) * $pow(2.0, F);
    if (sel == 1) return ga - d / 2.0;
    if (sel == 2) return -m;
    return d / 2.0;
  endfunction

  // Segment s is usable by the polynomial when its minimax error leaves room
  // for the rounding errors and it is clear of the saturated range.
  function automatic bit seg_ok(int k, longint s);
    if (s < 1) return 1'b0;
    return !(seg_fit(k, s, 0) > 0.5 - $pow(2.0, 1 - GB) ||
             s * (64'd1 << (W - k)) < ISAT ||
             seg_fit(k, s, 1) + 1.0 >= real'(MAXV));
  endfunction

  // First segment from which every segment is usable (2^k if none). The
  // error of a segment falls as x grows (the curvature falls), so seg_ok is
  // monotone in s and a binary search finds the boundary.
  function automatic longint seg_tab(int k);
    longint lo, hi, mid;
    lo = 1;
    hi = 64'd1 << k;
    while (lo < hi) begin
      mid = (lo + hi) / 2;
      if (seg_ok(k, mid)) hi = mid;
      else                lo = mid + 1;
    end
    return lo;
  endfunction

  function automatic int bits_of(longint v);
    int n;
    n = 1;
    while ((64'd1 << n) <= v) n++;
    return n;
  endfunction

  // Largest scaled c1 among polynomial segments: the slope is steepest in
  // the first polynomial segment.
  function automatic longint c1_max(int k, longint st);
    longint v;
    if (st >= (64'd1 << k)) return 1;
    v = rnd(seg_fit(k, st, 2) * $pow(2.0, W - k + GB));
    return (v > 1) ? v : 1;
  endfunction

  // Offset-table width for base+offset sampling every 2^sb entries of the
  // table [tb, tb+n). The rounded table is non-increasing, so the largest
  // offset of a block is at its last entry; it is exact for the first block
  // and bounded for the second (later blocks vary less: convex function).
  function automatic int off_width(longint tb, longint n, int sb);
    longint e, mx, dd;
    e  = tb + (64'd1 << sb) - 1;
    if (e > tb + n - 1) e = tb + n - 1;
    mx = rn(tb) - rn(e);
    if ((64'd2 << sb) <= n) begin
      dd = longint'($ceil(g(tb + (64'd1 << sb)) - g(tb + (64'd2 << sb) - 1))) + 1;
      if (dd > mx) mx = dd;
    end
    return bits_of(mx);
  endfunction

  // Table choice packed as {cost, sb, ow}: sb = 0 means a plain table.
  function automatic longint table_choice(longint tb, longint n);
    int best, c, sb, ow, sbb, owb;
    best = m10k_blocks(n, W);
    sbb = 0;
    owb = W;
    for (sb = 1; sb <= 8; sb++) begin
      if ((64'd1 << sb) < n) begin
        ow = off_width(tb, n, sb);
        c  = m10k_blocks((n + (64'd1 << sb) - 1) >> sb, W) + m10k_blocks(n, ow);
        if (c < best) begin
          best = c;
          sbb = sb;
          owb = ow;
        end
      end
    end
    return (longint'(best) << 32) | (longint'(sbb) << 16) | longint'(owb);
  endfunction

  // Polynomial architecture with K = k, packed as {cost, tb_is_isat, sb, ow}.
  function automatic longint poly_choice(int k);
    longint st, itab, ca, cb;
    int     c1w, coef;
    st   = seg_tab(k);
    itab = st << (W - k);
    c1w  = bits_of(c1_max(k, st));
    coef = m10k_blocks(64'd1 << k, (W + GB + 1) + c1w);
    ca   = table_choice(0, itab);               // indexed by x
    cb   = table_choice(ISAT, itab - ISAT);     // indexed by x - ISAT
    if ((ca >> 32) <= (cb >> 32))
      return (((ca >> 32) + longint'(coef)) << 32) | (ca & 64'hffff_ffff);
    return (((cb >> 32) + longint'(coef)) << 32) | (64'd1 << 31) | (cb & 64'hffff_ffff);
  endfunction

  function automatic int best_k();
    int     k, bk;
    longint c, best;
    best = 64'd1 << 40;
    bk = 3;
    for (k = 3; k <= W - 3; k++) begin
      c = poly_choice(k) >> 32;
      if (c < best) begin
        best = c;
        bk = k;
      end
    end
    return bk;
  endfunction

  localparam int     K     = best_k();
  localparam longint PCH   = poly_choice(K);

  localparam int COST_A    = (IDX0 <= NIN) ? m10k_blocks(IDX0, W) : (1 << 30);
  localparam int COST_B    = (IDX0 <= NIN) ? m10k_blocks(IDX1, W) : (1 << 30);
  localparam int COST_POLY = int'(PCH >> 32);
  localparam arch_e ARCH   = (COST_A <= COST_B && COST_A <= COST_POLY) ? ARCH_UF_A :
                             (COST_B <= COST_POLY) ? ARCH_UF_B : ARCH_POLY;

  localparam longint STAB = seg_tab(K);
  localparam longint ITAB = STAB << (W - K);
  localparam longint TB   = PCH[31] ? ISAT : 0;
  localparam int     SB   = int'((PCH >> 16) & 64'h7fff);
  localparam int     OW   = int'(PCH & 64'hffff);
  localparam int     C1W  = bits_of(c1_max(K, STAB));
  localparam int     C0W  = W + GB + 1;
  localparam int     C1F  = W - K + GB;

  localparam int LATENCY = (ARCH != ARCH_POLY) ? 2 : ((SB == 0) ? 6 : 7);
  localparam int NATIVE  = (ARCH != ARCH_POLY) ? 2 : 4;

  // Table range [T_LO, T_HI) for the chosen architecture.
  localparam longint T_LO = (ARCH == ARCH_POLY) ? TB : 0;
  localparam longint T_HI = (ARCH == ARCH_UF_A) ? IDX0 : (ARCH == ARCH_UF_B) ? IDX1 : ITAB;
  localparam longint TN   = (T_HI > T_LO) ? T_HI - T_LO : 1;
  localparam int     TAW  = bits_of(TN - 1);

  // Polynomial coefficients of segment s (zero below STAB, never used).
  function automatic logic [C0W-1:0] c0_entry(longint s);
    if (s < STAB) return '0;
    return C0W'(rnd(seg_fit(K, s, 1) * $pow(2.0, GB)));
  endfunction
  function automatic logic [C1W-1:0] c1_entry(longint s);
    if (s < STAB) return '0;
    return C1W'(rnd(seg_fit(K, s, 2) * $pow(2.0, C1F)));
  endfunction
  // ---------------------------------------------------------------- tables
  logic [W-1:0]   t_off;
  logic [TAW-1:0] t_addr;
  logic [W-1:0]   tab_q;     // table value, stage 1
  logic           in_tab;
  assign in_tab = ({1'b0, x} >= (W+1)'(T_LO)) && ({1'b0, x} < (W+1)'(T_HI));
  assign t_off  = x - W'(T_LO);
  assign t_addr = in_tab ? t_off[TAW-1:0] : '0;

  if (ARCH == ARCH_POLY && SB != 0) begin : g_base_off
    localparam longint NB = (TN + (64'd1 << SB) - 1) >> SB;
    logic [W-1:0]  base_rom [NB];
    logic [OW-1:0] off_rom  [TN];
    for (genvar i = 0; i < int'(NB); i++) begin : g_b
      localparam logic [W-1:0] V = W'(rn(T_LO + (longint'(i) << SB)));
      assign base_rom[i] = V;
    end
    for (genvar i = 0; i < int'(TN); i++) begin : g_o
      localparam logic [OW-1:0] V = OW'(rn(T_LO + ((longint'(i) >> SB) << SB)) - rn(T_LO + i));
      assign off_rom[i] = V;
    end
    logic [W-1:0]  base_q;
    logic [OW-1:0] off_q;
    always_ff @(posedge clk) begin
      base_q <= base_rom[t_addr >> SB];
      off_q  <= off_rom[t_addr];
    end
    assign tab_q = base_q - W'(off_q);
  end else begin : g_plain
    logic [W-1:0] rom [TN];
    for (genvar i = 0; i < int'(TN); i++) begin : g_t
      localparam logic [W-1:0] V = W'(rn(T_LO + i));
      assign rom[i] = V;
    end
    logic [W-1:0] q;
    always_ff @(posedge clk) q <= rom[t_addr];
    assign tab_q = q;
  end

  // ---------------------------------------------------------------- datapath
  logic [W-1:0] y_native;
  logic         v_native;

  if (ARCH == ARCH_POLY) begin : g_poly
    logic [C0W-1:0] c0_rom [2**K];
    logic [C1W-1:0] c1_rom [2**K];
    for (genvar s = 0; s < 2**K; s++) begin : g_c
      localparam logic [C0W-1:0] V0 = c0_entry(s);
      localparam logic [C1W-1:0] V1 = c1_entry(s);
      assign c0_rom[s] = V0;
      assign c1_rom[s] = V1;
    end

    logic [K-1:0]   seg;
    logic [W-K-1:0] off;
    assign seg = x[W-1 -: K];
    assign off = x[W-K-1:0];

    // stage 1: coefficient and table reads, region flags
    logic [C0W-1:0]   c0_1, c0_2;
    logic [C1W-1:0]   c1_1;
    logic [W-K-1:0]   off_1;
    logic             sat_1, tab_1, sat_2, tab_2, sat_3, tab_3;
    logic [W-1:0]     t_2, t_3;
    // stage 2: product
    logic [C1W+W-K-1:0] pr_2;
    // stage 3: sum
    logic signed [C0W:0] acc_3;
    // stage 4: rounding and selection
    logic [W-1:0]     y_4;
    logic [3:0]       v;

    logic signed [C0W:0] acc_r;
    logic [W-1:0]        poly_y;
    always_comb begin
      acc_r = acc_3 + (C0W+1)'(1 << (GB - 1));
      acc_r = acc_r >>> GB;
      if (acc_r < 0)                     poly_y = '0;
      else if (acc_r > (C0W+1)'(MAXV))   poly_y = W'(MAXV);
      else                               poly_y = W'(acc_r);
    end

    always_ff @(posedge clk) begin
      if (rst) v <= '0;
      else     v <= {v[2:0], in_valid};
      c0_1  <= c0_rom[seg];
      c1_1  <= c1_rom[seg];
      off_1 <= off;
      sat_1 <= ({1'b0, x} < (W+1)'(TB));
      tab_1 <= ({1'b0, x} < (W+1)'(ITAB));
      pr_2  <= c1_1 * off_1;
      c0_2  <= c0_1;
      t_2   <= tab_q;
      sat_2 <= sat_1;
      tab_2 <= tab_1;
      acc_3 <= signed'((C0W+1)'(c0_2)) - signed'((C0W+1)'(pr_2 >> (C1F - GB)));
      t_3   <= t_2;
      sat_3 <= sat_2;
      tab_3 <= tab_2;
      y_4   <= sat_3 ? W'(MAXV) : (tab_3 ? t_3 : poly_y);
    end
    assign y_native = y_4;
    assign v_native = v[3];
  end else begin : g_uf
    logic       v1, v2, ztab_1, one_1;
    logic [W-1:0] y_2;
    always_ff @(posedge clk) begin
      if (rst) {v1, v2} <= '0;
      else     {v1, v2} <= {in_valid, v1};
      ztab_1 <= in_tab;
      one_1  <= ({1'b0, x} < (W+1)'(IDX0));
      y_2    <= ztab_1 ? tab_q : (one_1 ? W'(1) : '0);
    end
    assign y_native = y_2;
    assign v_native = v2;
  end

  pipe_delay #(.W(W), .DEPTH(LATENCY - NATIVE)) u_out (
    .clk, .rst, .in_valid(v_native), .in_data(y_native),
    .out_valid, .out_data(y)
  );

  initial begin
    assert (FN != FN_SQRT) else $error("holistic_fn: only decreasing functions (1/x, 1/sqrt(x))");
  end
endmodule
