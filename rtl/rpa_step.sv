// rpa_step: one iteration of the Russian Peasant multiplication over GF(2^N),
// as combinational logic.
//
// If b is odd the current a is added (XOR) into the product. Then a is doubled
// (shift left by one) and, when its top bit was set before the shift, reduced
// by XOR with the low N bits of the irreducible polynomial. Finally b is
// halved (shift right by one). N of these steps in a row give a * b.
// The step is purely combinational; rpa_mul_pipe and multi_mul_rpa put a
// register after each one.
module rpa_step #(
  parameter int unsigned N = 8,
  parameter logic [N:0]  POLY = gf_pkg::FF_POLY
) (
  input  logic [N-1:0] a_i,
  input  logic [N-1:0] b_i,
  input  logic [N-1:0] p_i,   // running product
  output logic [N-1:0] a_o,
  output logic [N-1:0] b_o,
  output logic [N-1:0] p_o
);
  always_comb begin
    p_o = b_i[0] ? (p_i ^ a_i) : p_i;
    a_o = a_i[N-1] ? ((a_i << 1) ^ POLY[N-1:0]) : (a_i << 1);
    b_o = b_i >> 1;
  end
endmodule
