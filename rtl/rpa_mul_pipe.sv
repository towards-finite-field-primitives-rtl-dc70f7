// rpa_mul_pipe: GF(2^N) multiplier built from N unrolled Russian Peasant
// iterations, one per pipeline stage.
//
// The loop of the algorithm runs exactly N times, so it is unrolled: stage k
// holds (a, b, product) after k iterations, each stage being an rpa_step
// followed by a register. A new operand pair is accepted every cycle (line
// rate) and its product appears N cycles later with out_valid. A tag of TAG_W
// bits travels with each pair so that callers can carry other header fields.
// Registers have no reset except the valid bits; data is don't-care while
// invalid.
module rpa_mul_pipe #(
  parameter int unsigned N     = 8,
  parameter logic [N:0]  POLY  = gf_pkg::FF_POLY,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [N-1:0]     in_a,
  input  logic [N-1:0]     in_b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [N-1:0]     out_product,
  output logic [TAG_W-1:0] out_tag
);
  // Stage 0 is the input; stage k (1..N) is the register after iteration k.
  logic [N-1:0]     a_q   [N+1];
  logic [N-1:0]     b_q   [N+1];
  logic [N-1:0]     p_q   [N+1];
  logic [TAG_W-1:0] tag_q [N+1];
  logic             vld_q [N+1];

  assign a_q[0]   = in_a;
  assign b_q[0]   = in_b;
  assign p_q[0]   = '0;
  assign tag_q[0] = in_tag;
  assign vld_q[0] = in_valid;

  for (genvar k = 0; k < N; k++) begin : g_iter
    logic [N-1:0] a_n, b_n, p_n;
    rpa_step #(.N(N), .POLY(POLY)) u_step (
      .a_i(a_q[k]), .b_i(b_q[k]), .p_i(p_q[k]),
      .a_o(a_n),    .b_o(b_n),    .p_o(p_n)
    );
    always_ff @(posedge clk) begin
      a_q[k+1]   <= a_n;
      b_q[k+1]   <= b_n;
      p_q[k+1]   <= p_n;
      tag_q[k+1] <= tag_q[k];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld_q[k+1] <= 1'b0;
      else        vld_q[k+1] <= vld_q[k];
    end
  end

  assign out_valid   = vld_q[N];
  assign out_product = p_q[N];
  assign out_tag     = tag_q[N];
endmodule
