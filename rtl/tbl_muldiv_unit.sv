// tbl_muldiv_unit: memory-intensive GF(2^N) multiply, divide and invert
// through precomputed log, antilog and inverse tables.
//
// a * b = antilog[(log[a] + log[b]) mod (2^N - 1)], where the sum is ordinary
// integer addition; a / b = a * inv[b]; inv(b) = inv[b]. Each table matches on
// one operand only, so the lookups are spread over a pipeline in the order
//   cycle 1: log[a] and inv[b] are read
//   cycle 2: log[b'] is read, b' = inv[b] for divide, b for multiply
//   cycle 3: the two logs are added, 2^N-1 is subtracted when the sum reaches
//            it, and antilog[sum] is read
//   cycle 4: the result is registered (antilog output, inv[b] for the
//            invert op, or 0 when an operand of the product is 0)
// so out_valid follows in_valid by 4 cycles, one operation per cycle.
// op[1:0]: 00 multiply, 01 divide, 11 invert b (a ignored); 10 acts as
// multiply. Bit 0 selecting the inverse lookup follows the source algorithm;
// the zero handling is this design's own (log of 0 does not exist; x/0 and
// 0^-1 give 0). Only the valid bits are reset.
module tbl_muldiv_unit #(
  parameter int unsigned N     = 8,
  parameter logic [N:0]  POLY  = gf_pkg::FF_POLY,
  parameter logic [N-1:0] GEN  = gf_pkg::FF_GEN,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [1:0]       in_op,
  input  logic [N-1:0]     in_a,
  input  logic [N-1:0]     in_b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [N-1:0]     out_result,
  output logic [TAG_W-1:0] out_tag
);
  localparam logic [N:0] MAX_LOG = {1'b0, {N{1'b1}}};   // 2^N - 1

  // ---- cycle 1: log[a], inv[b]
  logic [N-1:0]     log_a, inv_b;
  logic [1:0]       op1;
  logic [N-1:0]     a1, b1;
  logic [TAG_W-1:0] tag1;
  logic             vld1;

  gf_table_rom #(.N(N), .POLY(POLY), .GEN(GEN), .KIND(gf_pkg::TBL_LOG)) u_log_a (
    .clk(clk), .addr(in_a), .data(log_a));
  gf_table_rom #(.N(N), .POLY(POLY), .GEN(GEN), .KIND(gf_pkg::TBL_INV)) u_inv (
    .clk(clk), .addr(in_b), .data(inv_b));

  always_ff @(posedge clk) begin
    op1  <= in_op;
    a1   <= in_a;
    b1   <= in_b;
    tag1 <= in_tag;
  end

  // ---- cycle 2: log[b']
  logic [N-1:0]     b_sel, log_b, log_a2, inv_b2;
  logic [1:0]       op2;
  logic             zero2;
  logic [TAG_W-1:0] tag2;
  logic             vld2;

  assign b_sel = op1[0] ? inv_b : b1;

  gf_table_rom #(.N(N), .POLY(POLY), .GEN(GEN), .KIND(gf_pkg::TBL_LOG)) u_log_b (
    .clk(clk), .addr(b_sel), .data(log_b));

  always_ff @(posedge clk) begin
    log_a2 <= log_a;
    inv_b2 <= inv_b;
    op2    <= op1;
    zero2  <= (a1 == '0) || (b_sel == '0);
    tag2   <= tag1;
  end

  // ---- cycle 3: sum, reduce, antilog[sum]
  logic [N:0]       sum;
  logic [N-1:0]     sum_red, prod, inv_b3;
  logic [1:0]       op3;
  logic             zero3;
  logic [TAG_W-1:0] tag3;
  logic             vld3;

  always_comb begin
    sum     = {1'b0, log_a2} + {1'b0, log_b};
    sum_red = (sum >= MAX_LOG) ? N'(sum - MAX_LOG) : sum[N-1:0];
  end

  gf_table_rom #(.N(N), .POLY(POLY), .GEN(GEN), .KIND(gf_pkg::TBL_ANTILOG)) u_antilog (
    .clk(clk), .addr(sum_red), .data(prod));

  always_ff @(posedge clk) begin
    inv_b3 <= inv_b2;
    op3    <= op2;
    zero3  <= zero2;
    tag3   <= tag2;
  end

  // ---- cycle 4: result register
  always_ff @(posedge clk) begin
    if (op3 == 2'b11)  out_result <= inv_b3;
    else if (zero3)    out_result <= '0;
    else               out_result <= prod;
    out_tag <= tag3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld1      <= 1'b0;
      vld2      <= 1'b0;
      vld3      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      vld1      <= in_valid;
      vld2      <= vld1;
      vld3      <= vld2;
      out_valid <= vld3;
    end
  end
endmodule
