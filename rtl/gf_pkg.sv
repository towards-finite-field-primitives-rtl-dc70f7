// gf_pkg: constants and types shared by the finite-field primitive units.
//
// The design operates on GF(2^N). Its default field is GF(2^8) with the
// irreducible polynomial x^8 + x^4 + x^3 + x + 1 (0x11B) and the generator
// x + 1 (0x03), the field and generator used for the worked examples and the
// log/antilog/inverse tables this design reproduces. The polynomial is carried
// as an (N+1)-bit value, bit N set.
//
// The op field of the single-operation header is 8 bits wide and names the
// operation and the approach. Only "bit 0 set means the inverse of b is looked
// up" is given for the table approach; the remaining code points are this
// design's own choice:
//   bit 2 = 0 : table (memory-intensive) approach
//   bit 2 = 1 : iterative (computationally-intensive) approach
//   bits[1:0] : 00 multiply, 01 divide, 11 invert b, 10 divide by inversion + RPA
//               (10 only exists for the iterative approach)
// Any other op value leaves the result field at 0.
package gf_pkg;

  localparam int unsigned FF_BITS = 8;
  localparam logic [FF_BITS:0] FF_POLY = 9'h11B;
  localparam logic [FF_BITS-1:0] FF_GEN = 8'h03;

  typedef enum logic [7:0] {
    OP_MUL_TBL     = 8'h00,
    OP_DIV_TBL     = 8'h01,
    OP_INV_TBL     = 8'h03,
    OP_MUL_RPA     = 8'h04,
    OP_DIV_EBD     = 8'h05,
    OP_DIV_INV_RPA = 8'h06,
    OP_INV_ALG     = 8'h07
  } ff_op_e;

  // Contents selector of a precomputed field table.
  typedef enum logic [1:0] {
    TBL_LOG     = 2'd0,
    TBL_ANTILOG = 2'd1,
    TBL_INV     = 2'd2
  } ff_table_e;

endpackage
