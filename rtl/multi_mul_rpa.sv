// multi_mul_rpa: K independent GF(2^N) multiplications carried by one header,
// computed with Russian Peasant iterations applied to all K operand pairs in
// lockstep ("parallel" arrangement).
//
// Pair j is (in_a[j], in_b[j]) and its product lands in out_result[j].
// Pipeline stage k performs iteration k of every pair at once: K rpa_step
// instances side by side, followed by one register. The N stages take N
// cycles; one header enters per cycle. K = 9 is the largest number of
// multiplications per packet reported for this arrangement on the
// reconfigurable (MapReduce) switch target; the same structure with K = 8
// is the programmable-ASIC figure. Only the valid bits are reset.
module multi_mul_rpa #(
  parameter int unsigned N    = gf_pkg::FF_BITS,
  parameter logic [N:0]  POLY = gf_pkg::FF_POLY,
  parameter int unsigned K    = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] in_a [K],
  input  logic [N-1:0] in_b [K],
  output logic         out_valid,
  output logic [N-1:0] out_result [K]
);
  logic [N-1:0] a_q [N+1][K];
  logic [N-1:0] b_q [N+1][K];
  logic [N-1:0] p_q [N+1][K];
  logic         vld_q [N+1];

  for (genvar j = 0; j < K; j++) begin : g_in
    assign a_q[0][j] = in_a[j];
    assign b_q[0][j] = in_b[j];
    assign p_q[0][j] = '0;
  end
  assign vld_q[0] = in_valid;

  for (genvar k = 0; k < N; k++) begin : g_iter
    for (genvar j = 0; j < K; j++) begin : g_lane
      logic [N-1:0] a_n, b_n, p_n;
      rpa_step #(.N(N), .POLY(POLY)) u_step (
        .a_i(a_q[k][j]), .b_i(b_q[k][j]), .p_i(p_q[k][j]),
        .a_o(a_n),       .b_o(b_n),       .p_o(p_n)
      );
      always_ff @(posedge clk) begin
        a_q[k+1][j] <= a_n;
        b_q[k+1][j] <= b_n;
        p_q[k+1][j] <= p_n;
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld_q[k+1] <= 1'b0;
      else        vld_q[k+1] <= vld_q[k];
    end
  end

  assign out_valid = vld_q[N];
  for (genvar j = 0; j < K; j++) begin : g_out
    assign out_result[j] = p_q[N][j];
  end
endmodule
