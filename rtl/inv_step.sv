// inv_step: one iteration of the binary extended-Euclid inversion over
// GF(2^N), as combinational logic.
//
// State: x (operand, N+1 bits), s (starts as the irreducible polynomial,
// N+1 bits), u (becomes x^-1) and v (N+1 bits each) and delta (degree
// tracker). One iteration, statements in order:
//   if x[N] == 0:  x <= x << 1;  u <= u << 1;  delta <= delta + 1
//   else:          if s[N] == 1: s <= s ^ x; v <= v ^ u
//                  s <= s << 1
//                  if delta == 0: (x, s) <= (s, x); (u, v) <= (v << 1, u);
//                                 delta <= 1
//                  else:          u <= u >> 1; delta <= delta - 1
// The swap uses the s and v already updated earlier in the same iteration.
module inv_step #(
  parameter int unsigned N  = 8,
  parameter int unsigned DW = $clog2(2 * N + 1) + 1
) (
  input  logic [N:0]    x_i,
  input  logic [N:0]    s_i,
  input  logic [N:0]    u_i,
  input  logic [N:0]    v_i,
  input  logic [DW-1:0] d_i,
  output logic [N:0]    x_o,
  output logic [N:0]    s_o,
  output logic [N:0]    u_o,
  output logic [N:0]    v_o,
  output logic [DW-1:0] d_o
);
  logic [N:0] s_x, v_x;

  always_comb begin
    x_o = x_i;
    s_o = s_i;
    u_o = u_i;
    v_o = v_i;
    d_o = d_i;
    s_x = s_i;
    v_x = v_i;
    if (!x_i[N]) begin
      x_o = x_i << 1;
      u_o = u_i << 1;
      d_o = d_i + DW'(1);
    end else begin
      if (s_i[N]) begin
        s_x = s_i ^ x_i;
        v_x = v_i ^ u_i;
      end
      s_x = s_x << 1;
      if (d_i == '0) begin
        x_o = s_x;
        s_o = x_i;
        u_o = v_x << 1;
        v_o = u_i;
        d_o = DW'(1);
      end else begin
        s_o = s_x;
        v_o = v_x;
        u_o = u_i >> 1;
        d_o = d_i - DW'(1);
      end
    end
  end
endmodule
