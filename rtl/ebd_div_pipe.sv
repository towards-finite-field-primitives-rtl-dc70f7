// ebd_div_pipe: GF(2^N) divider (a / b) built from 2N-1 unrolled EBd
// iterations, one per pipeline stage.
//
// Stage 0 loads s = P (irreducible polynomial), v = 0, delta = -1 next to the
// operands; each of the 2N-1 stages is an ebd_step followed by a register. The
// quotient is the v variable after the last iteration. One division is
// accepted per cycle and its quotient leaves 2N-1 cycles later with
// out_valid, together with the TAG_W-bit tag that entered with it.
// Division by zero is not defined by the algorithm; this design returns 0 for
// b = 0 (the iterations never touch v then, so this falls out unforced).
// Only the valid bits are reset.
module ebd_div_pipe #(
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
  output logic [N-1:0]     out_quotient,
  output logic [TAG_W-1:0] out_tag
);
  localparam int unsigned ITER = 2 * N - 1;
  localparam int unsigned DW   = $clog2(2 * N + 1) + 1;

  logic [N-1:0]         a_q   [ITER+1];
  logic [N:0]           b_q   [ITER+1];
  logic [N:0]           s_q   [ITER+1];
  logic [N-1:0]         v_q   [ITER+1];
  logic signed [DW-1:0] d_q   [ITER+1];
  logic [TAG_W-1:0]     tag_q [ITER+1];
  logic                 vld_q [ITER+1];

  assign a_q[0]   = in_a;
  assign b_q[0]   = {1'b0, in_b};
  assign s_q[0]   = POLY;
  assign v_q[0]   = '0;
  assign d_q[0]   = -DW'(1);
  assign tag_q[0] = in_tag;
  assign vld_q[0] = in_valid;

  for (genvar k = 0; k < ITER; k++) begin : g_iter
    logic [N-1:0]         a_n, v_n;
    logic [N:0]           b_n, s_n;
    logic signed [DW-1:0] d_n;
    ebd_step #(.N(N), .POLY(POLY), .DW(DW)) u_step (
      .a_i(a_q[k]), .b_i(b_q[k]), .s_i(s_q[k]), .v_i(v_q[k]), .d_i(d_q[k]),
      .a_o(a_n),    .b_o(b_n),    .s_o(s_n),    .v_o(v_n),    .d_o(d_n)
    );
    always_ff @(posedge clk) begin
      a_q[k+1]   <= a_n;
      b_q[k+1]   <= b_n;
      s_q[k+1]   <= s_n;
      v_q[k+1]   <= v_n;
      d_q[k+1]   <= d_n;
      tag_q[k+1] <= tag_q[k];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld_q[k+1] <= 1'b0;
      else        vld_q[k+1] <= vld_q[k];
    end
  end

  assign out_valid    = vld_q[ITER];
  assign out_quotient = v_q[ITER];
  assign out_tag      = tag_q[ITER];
endmodule
