// multi_mul_tbl: K independent GF(2^N) multiplications carried by one header,
// each computed through its own log, log and antilog tables.
//
// A table matches on one operand only, so pair j owns three table copies:
// log[a_j], log[b_j] (read in the same cycle, as the operands are both in the
// header) and antilog[(log[a_j] + log[b_j]) mod (2^N - 1)]. A zero operand
// gives a zero product. Latency: cycle 1 log reads, cycle 2 sum and antilog
// read, cycle 3 result register; one header per cycle. K = 15 is the largest
// number of table-based multiplications per packet reported on the
// programmable-ASIC target. Only the valid bits are reset.
module multi_mul_tbl #(
  parameter int unsigned  N    = gf_pkg::FF_BITS,
  parameter logic [N:0]   POLY = gf_pkg::FF_POLY,
  parameter logic [N-1:0] GEN  = gf_pkg::FF_GEN,
  parameter int unsigned  K    = 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] in_a [K],
  input  logic [N-1:0] in_b [K],
  output logic         out_valid,
  output logic [N-1:0] out_result [K]
);
  localparam logic [N:0] MAX_LOG = {1'b0, {N{1'b1}}};   // 2^N - 1

  logic vld1, vld2;

  for (genvar j = 0; j < K; j++) begin : g_mul
    logic [N-1:0] log_a, log_b, sum_red, prod;
    logic [N:0]   sum;
    logic         zero1, zero2;

    gf_table_rom #(.N(N), .POLY(POLY), .GEN(GEN), .KIND(gf_pkg::TBL_LOG)) u_log_a (
      .clk(clk), .addr(in_a[j]), .data(log_a));
    gf_table_rom #(.N(N), .POLY(POLY), .GEN(GEN), .KIND(gf_pkg::TBL_LOG)) u_log_b (
      .clk(clk), .addr(in_b[j]), .data(log_b));

    always_comb begin
      sum     = {1'b0, log_a} + {1'b0, log_b};
      sum_red = (sum >= MAX_LOG) ? N'(sum - MAX_LOG) : sum[N-1:0];
    end

    gf_table_rom #(.N(N), .POLY(POLY), .GEN(GEN), .KIND(gf_pkg::TBL_ANTILOG)) u_antilog (
      .clk(clk), .addr(sum_red), .data(prod));

    always_ff @(posedge clk) begin
      zero1 <= (in_a[j] == '0) || (in_b[j] == '0);
      zero2 <= zero1;
      out_result[j] <= zero2 ? '0 : prod;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld1      <= 1'b0;
      vld2      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      vld1      <= in_valid;
      vld2      <= vld1;
      out_valid <= vld2;
    end
  end
endmodule
