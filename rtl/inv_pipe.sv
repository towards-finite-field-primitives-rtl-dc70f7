// inv_pipe: GF(2^N) inverter built from 2N unrolled inversion iterations, one
// per pipeline stage.
//
// Stage 0 loads x = operand, s = P (irreducible polynomial), u = 1, v = 0,
// delta = 0; each of the 2N stages is an inv_step followed by a register. The
// inverse is u after the last iteration. One operand is accepted per cycle
// and its inverse leaves 2N cycles later with out_valid, together with the
// TAG_W-bit tag that entered with it. Zero has no inverse; this design
// returns 0 for it (a flag travels down the pipeline to force that).
// Only the valid bits are reset.
module inv_pipe #(
  parameter int unsigned N     = 8,
  parameter logic [N:0]  POLY  = gf_pkg::FF_POLY,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [N-1:0]     in_x,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [N-1:0]     out_inverse,
  output logic [TAG_W-1:0] out_tag
);
  localparam int unsigned ITER = 2 * N;
  localparam int unsigned DW   = $clog2(2 * N + 1) + 1;

  logic [N:0]       x_q   [ITER+1];
  logic [N:0]       s_q   [ITER+1];
  logic [N:0]       u_q   [ITER+1];
  logic [N:0]       v_q   [ITER+1];
  logic [DW-1:0]    d_q   [ITER+1];
  logic             z_q   [ITER+1];
  logic [TAG_W-1:0] tag_q [ITER+1];
  logic             vld_q [ITER+1];

  assign x_q[0]   = {1'b0, in_x};
  assign s_q[0]   = POLY;
  assign u_q[0]   = (N+1)'(1);
  assign v_q[0]   = '0;
  assign d_q[0]   = '0;
  assign z_q[0]   = (in_x == '0);
  assign tag_q[0] = in_tag;
  assign vld_q[0] = in_valid;

  for (genvar k = 0; k < ITER; k++) begin : g_iter
    logic [N:0]    x_n, s_n, u_n, v_n;
    logic [DW-1:0] d_n;
    inv_step #(.N(N), .DW(DW)) u_step (
      .x_i(x_q[k]), .s_i(s_q[k]), .u_i(u_q[k]), .v_i(v_q[k]), .d_i(d_q[k]),
      .x_o(x_n),    .s_o(s_n),    .u_o(u_n),    .v_o(v_n),    .d_o(d_n)
    );
    always_ff @(posedge clk) begin
      x_q[k+1]   <= x_n;
      s_q[k+1]   <= s_n;
      u_q[k+1]   <= u_n;
      v_q[k+1]   <= v_n;
      d_q[k+1]   <= d_n;
      z_q[k+1]   <= z_q[k];
      tag_q[k+1] <= tag_q[k];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld_q[k+1] <= 1'b0;
      else        vld_q[k+1] <= vld_q[k];
    end
  end

  assign out_valid   = vld_q[ITER];
  assign out_inverse = z_q[ITER] ? '0 : u_q[ITER][N-1:0];
  assign out_tag     = tag_q[ITER];
endmodule
