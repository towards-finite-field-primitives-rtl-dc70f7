// gf_table_rom: one precomputed GF(2^N) table with a registered read port,
// the hardware counterpart of one exact-match lookup table.
//
// KIND selects the contents:
//   TBL_LOG     : log[x] = i such that GEN^i = x, for x != 0 (log[0] = 0,
//                 unused: zero operands are handled by the caller)
//   TBL_ANTILOG : antilog[i] = GEN^i for i = 0 .. 2^N-2, antilog[2^N-1] = 1
//   TBL_INV     : inv[x] = x^-1 (inv[GEN^i] = GEN^-i), inv[0] = 0
// The contents are computed at elaboration by walking the powers of the
// generator, each multiplied by GEN with shift-and-XOR arithmetic reduced by
// POLY. For the default GF(2^8), POLY = 0x11B, GEN = 0x03 this reproduces the
// published logarithm, antilogarithm and inverse tables of that field. The
// table is read-only: the values depend only on the field, so they are not
// reloadable at run time. data is valid the cycle after addr.
module gf_table_rom #(
  parameter int unsigned       N    = 8,
  parameter logic [N:0]        POLY = gf_pkg::FF_POLY,
  parameter logic [N-1:0]      GEN  = gf_pkg::FF_GEN,
  parameter gf_pkg::ff_table_e KIND = gf_pkg::TBL_LOG
) (
  input  logic         clk,
  input  logic [N-1:0] addr,
  output logic [N-1:0] data
);
  localparam int unsigned SIZE = 2 ** N;

  typedef logic [N-1:0] table_t [SIZE];

  function automatic logic [N-1:0] mul_by(input logic [N-1:0] x, input logic [N-1:0] c);
    logic [N-1:0] acc, m, g;
    acc = '0;
    m   = x;
    g   = c;
    for (int i = 0; i < int'(N); i++) begin
      if (g[0]) acc = acc ^ m;
      m = m[N-1] ? ((m << 1) ^ POLY[N-1:0]) : (m << 1);
      g = g >> 1;
    end
    return acc;
  endfunction

  function automatic logic [N-1:0] mul_gen(input logic [N-1:0] x);
    return mul_by(x, GEN);
  endfunction

  // Walks the powers GEN^i, i = 0 .. 2^N-2, and fills only the table this
  // instance needs. For the inverse, y runs through GEN^-i alongside x = GEN^i
  // (GEN^-1 = GEN^(2^N-2)), so inv[x] = y.
  function automatic table_t build_table();
    table_t res;
    logic [N-1:0] x, y, ginv;
    for (int i = 0; i < int'(SIZE); i++) res[i] = '0;
    ginv = N'(1);
    for (int i = 0; i < int'(SIZE) - 2; i++) ginv = mul_gen(ginv);
    x = N'(1);
    y = N'(1);
    for (int i = 0; i < int'(SIZE) - 1; i++) begin
      case (KIND)
        gf_pkg::TBL_LOG:     res[x] = N'(i);
        gf_pkg::TBL_ANTILOG: res[i] = x;
        default:             res[x] = y;
      endcase
      x = mul_gen(x);
      y = mul_by(y, ginv);
    end
    if (KIND == gf_pkg::TBL_ANTILOG) res[SIZE-1] = N'(1);
    return res;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) data <= TABLE[addr];
endmodule
