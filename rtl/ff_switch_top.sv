// ff_switch_top: the finite-field primitives of a switch data plane, GF(2^8)
// by default, as three independent line-rate units side by side.
//
//   calc_* : ff_calc_unit. A 32-bit {op, a, b, result} header per cycle;
//            multiply, divide or invert with the table approach or with the
//            iterative approach (RPA, EBd, inversion, inversion + RPA).
//            Fixed latency max(4, 3N) + 1 = 25 cycles.
//   mtbl_* : multi_mul_tbl. Up to K_TBL = 15 multiplications per header
//            through log/antilog tables. Latency 3 cycles.
//   mrpa_* : multi_mul_rpa. K_RPA = 9 multiplications per header with RPA
//            iterations in lockstep. Latency N = 8 cycles.
// The three use different header layouts, so each has its own ports; they
// share only the clock and the active-low asynchronous reset. Packet parsing
// and deparsing, which would fill and drain these headers, are outside this
// block.
module ff_switch_top #(
  parameter int unsigned  N     = gf_pkg::FF_BITS,
  parameter logic [N:0]   POLY  = gf_pkg::FF_POLY,
  parameter logic [N-1:0] GEN   = gf_pkg::FF_GEN,
  parameter int unsigned  K_TBL = 15,
  parameter int unsigned  K_RPA = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  // single-operation header
  input  logic         calc_in_valid,
  input  logic [7:0]   calc_in_op,
  input  logic [N-1:0] calc_in_a,
  input  logic [N-1:0] calc_in_b,
  output logic         calc_out_valid,
  output logic [7:0]   calc_out_op,
  output logic [N-1:0] calc_out_a,
  output logic [N-1:0] calc_out_b,
  output logic [N-1:0] calc_out_result,
  // multi-multiplication header, table approach
  input  logic         mtbl_in_valid,
  input  logic [N-1:0] mtbl_in_a [K_TBL],
  input  logic [N-1:0] mtbl_in_b [K_TBL],
  output logic         mtbl_out_valid,
  output logic [N-1:0] mtbl_out_result [K_TBL],
  // multi-multiplication header, RPA approach
  input  logic         mrpa_in_valid,
  input  logic [N-1:0] mrpa_in_a [K_RPA],
  input  logic [N-1:0] mrpa_in_b [K_RPA],
  output logic         mrpa_out_valid,
  output logic [N-1:0] mrpa_out_result [K_RPA]
);
  ff_calc_unit #(.N(N), .POLY(POLY), .GEN(GEN)) u_calc (
    .clk, .rst_n,
    .in_valid(calc_in_valid), .in_op(calc_in_op), .in_a(calc_in_a), .in_b(calc_in_b),
    .out_valid(calc_out_valid), .out_op(calc_out_op), .out_a(calc_out_a),
    .out_b(calc_out_b), .out_result(calc_out_result));

  multi_mul_tbl #(.N(N), .POLY(POLY), .GEN(GEN), .K(K_TBL)) u_mtbl (
    .clk, .rst_n,
    .in_valid(mtbl_in_valid), .in_a(mtbl_in_a), .in_b(mtbl_in_b),
    .out_valid(mtbl_out_valid), .out_result(mtbl_out_result));

  multi_mul_rpa #(.N(N), .POLY(POLY), .K(K_RPA)) u_mrpa (
    .clk, .rst_n,
    .in_valid(mrpa_in_valid), .in_a(mrpa_in_a), .in_b(mrpa_in_b),
    .out_valid(mrpa_out_valid), .out_result(mrpa_out_result));
endmodule
