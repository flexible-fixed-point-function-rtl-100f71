// fxp_funcgen_top: the generated fixed-point function operators side by side.
//
// Each operator is an independent pipelined unit with its own valid/data
// ports; they share only the clock and the synchronous active-high reset.
// The set shown is the one a function generator would produce for the
// formats evaluated for this design:
//   hol_recip_*   1/x       on (16,8), holistic full-range (latency 6)
//   hol_rsqrt_*   1/sqrt(x) on (16,8), holistic full-range (latency 6)
//   tm1_recip_*   1/x       on (21,20) in [1,2), first-order tabulate-and-multiply (4)
//   tm2_recip_*   1/x       on (24,23) in [1,2), second-order tabulate-and-multiply (5)
//   tm2_rsqrt_*   1/sqrt(x) on (24,23), second order (9)
//   tm2_sqrt_*    sqrt(x)   on (24,23), second order (8)
//   nr_recip_*    1/x       on (32,31), bipartite + Newton-Raphson (9)
//   hal_recip_*   1/x       on (32,31), bipartite + Halley-type cubic iteration (11)
//   hal_rsqrt_*   1/sqrt(x) on (32,31), bipartite + cubic iteration (19)
// Every result is faithful (within one unit in the last place); see each
// operator for its formats and timing.
module fxp_funcgen_top
  import fxp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,

  input  logic        hol_recip_in_valid,
  input  logic [15:0] hol_recip_x,
  output logic        hol_recip_out_valid,
  output logic [15:0] hol_recip_y,

  input  logic        hol_rsqrt_in_valid,
  input  logic [15:0] hol_rsqrt_x,
  output logic        hol_rsqrt_out_valid,
  output logic [15:0] hol_rsqrt_y,

  input  logic        tm1_recip_in_valid,
  input  logic [20:0] tm1_recip_x,
  output logic        tm1_recip_out_valid,
  output logic [20:0] tm1_recip_y,

  input  logic        tm2_recip_in_valid,
  input  logic [23:0] tm2_recip_x,
  output logic        tm2_recip_out_valid,
  output logic [23:0] tm2_recip_y,

  input  logic        tm2_rsqrt_in_valid,
  input  logic [23:0] tm2_rsqrt_x,
  output logic        tm2_rsqrt_out_valid,
  output logic [23:0] tm2_rsqrt_y,

  input  logic        tm2_sqrt_in_valid,
  input  logic [23:0] tm2_sqrt_x,
  output logic        tm2_sqrt_out_valid,
  output logic [23:0] tm2_sqrt_y,

  input  logic        nr_recip_in_valid,
  input  logic [31:0] nr_recip_x,
  output logic        nr_recip_out_valid,
  output logic [31:0] nr_recip_y,

  input  logic        hal_recip_in_valid,
  input  logic [31:0] hal_recip_x,
  output logic        hal_recip_out_valid,
  output logic [31:0] hal_recip_y,

  input  logic        hal_rsqrt_in_valid,
  input  logic [31:0] hal_rsqrt_x,
  output logic        hal_rsqrt_out_valid,
  output logic [31:0] hal_rsqrt_y
);
  holistic_fn #(.FN(FN_RECIP), .W(16), .F(8)) u_hol_recip (
    .clk, .rst, .in_valid(hol_recip_in_valid), .x(hol_recip_x),
    .out_valid(hol_recip_out_valid), .y(hol_recip_y));

  holistic_fn #(.FN(FN_RSQRT), .W(16), .F(8)) u_hol_rsqrt (
    .clk, .rst, .in_valid(hol_rsqrt_in_valid), .x(hol_rsqrt_x),
    .out_valid(hol_rsqrt_out_valid), .y(hol_rsqrt_y));

  tabmult1 #(.FN(FN_RECIP), .W(21)) u_tm1_recip (
    .clk, .rst, .in_valid(tm1_recip_in_valid), .x(tm1_recip_x),
    .out_valid(tm1_recip_out_valid), .y(tm1_recip_y));

  tabmult2 #(.FN(FN_RECIP), .W(24)) u_tm2_recip (
    .clk, .rst, .in_valid(tm2_recip_in_valid), .x(tm2_recip_x),
    .out_valid(tm2_recip_out_valid), .y(tm2_recip_y));

  tabmult2 #(.FN(FN_RSQRT), .W(24)) u_tm2_rsqrt (
    .clk, .rst, .in_valid(tm2_rsqrt_in_valid), .x(tm2_rsqrt_x),
    .out_valid(tm2_rsqrt_out_valid), .y(tm2_rsqrt_y));

  tabmult2 #(.FN(FN_SQRT), .W(24)) u_tm2_sqrt (
    .clk, .rst, .in_valid(tm2_sqrt_in_valid), .x(tm2_sqrt_x),
    .out_valid(tm2_sqrt_out_valid), .y(tm2_sqrt_y));

  newton_recip u_nr_recip (
    .clk, .rst, .in_valid(nr_recip_in_valid), .a(nr_recip_x),
    .out_valid(nr_recip_out_valid), .y(nr_recip_y));

  halley_recip u_hal_recip (
    .clk, .rst, .in_valid(hal_recip_in_valid), .a(hal_recip_x),
    .out_valid(hal_recip_out_valid), .y(hal_recip_y));

  halley_rsqrt u_hal_rsqrt (
    .clk, .rst, .in_valid(hal_rsqrt_in_valid), .a(hal_rsqrt_x),
    .out_valid(hal_rsqrt_out_valid), .y(hal_rsqrt_y));
endmodule
