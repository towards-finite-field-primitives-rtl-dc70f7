// ebd_step: one iteration of the EBd binary division algorithm over GF(2^N),
// as combinational logic.
//
// State: a (dividend side, N bits), b and s (N+1 bits; s starts as the
// irreducible polynomial), v (quotient accumulator, N bits) and delta (signed
// degree difference). One iteration:
//   if b is odd:  if delta < 0 then (b,s) <= (b^s, b), (a,v) <= (a^v, a),
//                                   delta <= -delta
//                 else            b <= b^s, a <= a^v
//   b <= b >> 1;  delta <= delta - 1;  a <= (a/2) mod P
// The paired assignments use the old values on both sides. (a/2) mod P is a
// rotate right by one where bit k (k < N-1) is also XORed with a0 & P[k+1];
// the rotated-in top bit a0 corresponds to P[N] = 1. That is a >> 1, XORed
// with P[N:1] when a is odd.
module ebd_step #(
  parameter int unsigned N    = 8,
  parameter logic [N:0]  POLY = gf_pkg::FF_POLY,
  parameter int unsigned DW   = $clog2(2 * N + 1) + 1
) (
  input  logic [N-1:0]         a_i,
  input  logic [N:0]           b_i,
  input  logic [N:0]           s_i,
  input  logic [N-1:0]         v_i,
  input  logic signed [DW-1:0] d_i,
  output logic [N-1:0]         a_o,
  output logic [N:0]           b_o,
  output logic [N:0]           s_o,
  output logic [N-1:0]         v_o,
  output logic signed [DW-1:0] d_o
);
  logic [N-1:0]         a_x;
  logic [N:0]           b_x;
  logic signed [DW-1:0] d_x;

  always_comb begin
    a_x = a_i;
    b_x = b_i;
    s_o = s_i;
    v_o = v_i;
    d_x = d_i;
    if (b_i[0]) begin
      b_x = b_i ^ s_i;
      a_x = a_i ^ v_i;
      if (d_i < 0) begin
        s_o = b_i;
        v_o = a_i;
        d_x = -d_i;
      end
    end
    b_o = b_x >> 1;
    d_o = d_x - DW'(1);
    a_o = a_x[0] ? ((a_x >> 1) ^ POLY[N:1]) : (a_x >> 1);
  end
endmodule
