// ff_calc_unit: line-rate finite-field operation on a {op, a, b, result}
// header, GF(2^N) with N = 8 by default (an 8+8+8+8 = 32-bit header).
//
// Every header entering with in_valid is handed to the engine its op names
// (encoding in gf_pkg):
//   OP_MUL_TBL, OP_DIV_TBL, OP_INV_TBL -> tbl_muldiv_unit (log/antilog/inverse
//                                         tables, 4 cycles)
//   OP_MUL_RPA                         -> rpa_mul_pipe   (N cycles)
//   OP_DIV_EBD                         -> ebd_div_pipe   (2N-1 cycles)
//   OP_INV_ALG                         -> inv_pipe       (2N cycles)
//   OP_DIV_INV_RPA                     -> inv_pipe then rpa_mul_pipe on
//                                         (a, b^-1)      (3N cycles)
// Inversion ignores a. All engines are fully pipelined, so one header is
// accepted per cycle whatever the mix of ops. The shorter engines' results
// are delayed to the longest path and the header fields travel in a matching
// delay line, so every header leaves after the same latency, max(4, 3N) + 1
// cycles (25 for N = 8), in arrival order, with op, a and b unchanged and the
// result field filled (0 for an op value outside the list).
// The fixed latency, the op code points and the in-order delay alignment are
// this design's choices; the algorithms and the header layout follow the
// source design.
module ff_calc_unit #(
  parameter int unsigned  N    = gf_pkg::FF_BITS,
  parameter logic [N:0]   POLY = gf_pkg::FF_POLY,
  parameter logic [N-1:0] GEN  = gf_pkg::FF_GEN
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [7:0]   in_op,
  input  logic [N-1:0] in_a,
  input  logic [N-1:0] in_b,
  output logic         out_valid,
  output logic [7:0]   out_op,
  output logic [N-1:0] out_a,
  output logic [N-1:0] out_b,
  output logic [N-1:0] out_result
);
  import gf_pkg::*;

  localparam int unsigned LAT_TBL  = 4;
  localparam int unsigned LAT_RPA  = N;
  localparam int unsigned LAT_EBD  = 2 * N - 1;
  localparam int unsigned LAT_INV  = 2 * N;
  localparam int unsigned LAT_DIR  = 3 * N;
  localparam int unsigned LAT_CORE = (LAT_DIR > LAT_TBL) ? LAT_DIR : LAT_TBL;

  logic is_tbl, is_rpa, is_ebd, is_inv, is_dir;
  always_comb begin
    is_tbl = (in_op == OP_MUL_TBL) || (in_op == OP_DIV_TBL) || (in_op == OP_INV_TBL);
    is_rpa = (in_op == OP_MUL_RPA);
    is_ebd = (in_op == OP_DIV_EBD);
    is_inv = (in_op == OP_INV_ALG);
    is_dir = (in_op == OP_DIV_INV_RPA);
  end

  // ---- engines
  logic         tbl_v, rpa_v, ebd_v, inv_v, dinv_v, dir_v;
  logic [N-1:0] tbl_r, rpa_r, ebd_r, inv_r, dinv_r, dir_r, dinv_a;

  tbl_muldiv_unit #(.N(N), .POLY(POLY), .GEN(GEN), .TAG_W(1)) u_tbl (
    .clk, .rst_n, .in_valid(in_valid && is_tbl), .in_op(in_op[1:0]),
    .in_a, .in_b, .in_tag(1'b0),
    .out_valid(tbl_v), .out_result(tbl_r), .out_tag());

  rpa_mul_pipe #(.N(N), .POLY(POLY), .TAG_W(1)) u_rpa (
    .clk, .rst_n, .in_valid(in_valid && is_rpa), .in_a, .in_b, .in_tag(1'b0),
    .out_valid(rpa_v), .out_product(rpa_r), .out_tag());

  ebd_div_pipe #(.N(N), .POLY(POLY), .TAG_W(1)) u_ebd (
    .clk, .rst_n, .in_valid(in_valid && is_ebd), .in_a, .in_b, .in_tag(1'b0),
    .out_valid(ebd_v), .out_quotient(ebd_r), .out_tag());

  inv_pipe #(.N(N), .POLY(POLY), .TAG_W(1)) u_inv (
    .clk, .rst_n, .in_valid(in_valid && is_inv), .in_x(in_b), .in_tag(1'b0),
    .out_valid(inv_v), .out_inverse(inv_r), .out_tag());

  // Division through inversion: b^-1 first (a rides along as the tag), then
  // a * b^-1 with RPA.
  inv_pipe #(.N(N), .POLY(POLY), .TAG_W(N)) u_dinv (
    .clk, .rst_n, .in_valid(in_valid && is_dir), .in_x(in_b), .in_tag(in_a),
    .out_valid(dinv_v), .out_inverse(dinv_r), .out_tag(dinv_a));

  rpa_mul_pipe #(.N(N), .POLY(POLY), .TAG_W(1)) u_dmul (
    .clk, .rst_n, .in_valid(dinv_v), .in_a(dinv_a), .in_b(dinv_r), .in_tag(1'b0),
    .out_valid(dir_v), .out_product(dir_r), .out_tag());

  // ---- alignment to LAT_CORE
  logic         tbl_dv, rpa_dv, ebd_dv, inv_dv, dir_dv, hdr_dv;
  logic [N-1:0] tbl_d, rpa_d, ebd_d, inv_d, dir_d;
  logic [7+2*N:0] hdr_d;

  ff_delay #(.W(N), .DEPTH(LAT_CORE - LAT_TBL)) u_al_tbl (
    .clk, .rst_n, .in_valid(tbl_v), .in_data(tbl_r), .out_valid(tbl_dv), .out_data(tbl_d));
  ff_delay #(.W(N), .DEPTH(LAT_CORE - LAT_RPA)) u_al_rpa (
    .clk, .rst_n, .in_valid(rpa_v), .in_data(rpa_r), .out_valid(rpa_dv), .out_data(rpa_d));
  ff_delay #(.W(N), .DEPTH(LAT_CORE - LAT_EBD)) u_al_ebd (
    .clk, .rst_n, .in_valid(ebd_v), .in_data(ebd_r), .out_valid(ebd_dv), .out_data(ebd_d));
  ff_delay #(.W(N), .DEPTH(LAT_CORE - LAT_INV)) u_al_inv (
    .clk, .rst_n, .in_valid(inv_v), .in_data(inv_r), .out_valid(inv_dv), .out_data(inv_d));
  ff_delay #(.W(N), .DEPTH(LAT_CORE - LAT_DIR)) u_al_dir (
    .clk, .rst_n, .in_valid(dir_v), .in_data(dir_r), .out_valid(dir_dv), .out_data(dir_d));
  ff_delay #(.W(8 + 2 * N), .DEPTH(LAT_CORE)) u_al_hdr (
    .clk, .rst_n, .in_valid(in_valid), .in_data({in_op, in_a, in_b}),
    .out_valid(hdr_dv), .out_data(hdr_d));

  // ---- result selection and output register
  always_ff @(posedge clk) begin
    {out_op, out_a, out_b} <= hdr_d;
    if (tbl_dv)      out_result <= tbl_d;
    else if (rpa_dv) out_result <= rpa_d;
    else if (ebd_dv) out_result <= ebd_d;
    else if (inv_dv) out_result <= inv_d;
    else if (dir_dv) out_result <= dir_d;
    else             out_result <= '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= hdr_dv;
  end

  // At most one engine delivers per cycle, and only for a header in flight.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({tbl_dv, rpa_dv, ebd_dv, inv_dv, dir_dv}));
  assert property (@(posedge clk) disable iff (!rst_n)
                   (tbl_dv || rpa_dv || ebd_dv || inv_dv || dir_dv) |-> hdr_dv);

endmodule
