// tb_ff_calc_unit: random mix of all operations through the header unit.
//
// 8192 headers with random op (the seven defined codes plus some undefined
// ones), random a and b (zero operands forced now and then) and random idle
// gaps, half of the run back to back. Each header must leave exactly 25
// cycles after it entered (the fixed latency for GF(2^8)), in order, with op,
// a and b unchanged and the result equal to the gf_ref_pkg value for its op
// (0 for an undefined op, x/0 and 0^-1). A watchdog ends the run with a
// failure if it stalls.
module tb_ff_calc_unit;
  import gf_ref_pkg::*;
  import gf_pkg::*;

  localparam int LAT = 25;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [7:0] inv8 [256];

  logic       in_valid, out_valid;
  logic [7:0] in_op, in_a, in_b, out_op, out_a, out_b, out_result;

  ff_calc_unit dut (
    .clk, .rst_n, .in_valid, .in_op, .in_a, .in_b,
    .out_valid, .out_op, .out_a, .out_b, .out_result);

  // Expected headers, in order.
  typedef struct { logic [7:0] op, a, b, r; int t; } exp_t;
  exp_t q[$];

  function automatic logic [7:0] expect_result(input logic [7:0] o, input logic [7:0] a,
                                               input logic [7:0] b);
    case (o)
      OP_MUL_TBL, OP_MUL_RPA:                 return 8'(ref_mul(a, b, 8, 'h11B));
      OP_DIV_TBL, OP_DIV_EBD, OP_DIV_INV_RPA: return 8'(ref_mul(a, inv8[b], 8, 'h11B));
      OP_INV_TBL, OP_INV_ALG:                 return inv8[b];
      default:                                return 8'd0;
    endcase
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        automatic exp_t e = q.pop_front();
        if (out_op !== e.op || out_a !== e.a || out_b !== e.b || out_result !== e.r ||
            cycle - e.t != LAT) begin
          failures++;
          if (failures < 10)
            $display("FAIL op=%02x a=%0d b=%0d got r=%0d exp %0d lat %0d",
                     e.op, e.a, e.b, out_result, e.r, cycle - e.t);
        end
      end
    end
  end

  logic [7:0] ops [10] = '{8'h00, 8'h01, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h02, 8'h08, 8'hff};

  initial begin
    in_valid = 0; in_op = 0; in_a = 0; in_b = 0;
    for (int i = 0; i < 256; i++) inv8[i] = 8'(ref_inv(i, 8, 'h11B));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 8192; i++) begin
      in_valid = 1'b1;
      in_op = ($urandom_range(0, 19) == 0) ? ops[$urandom_range(7, 9)] : ops[$urandom_range(0, 6)];
      in_a  = ($urandom_range(0, 15) == 0) ? 8'd0 : 8'($urandom);
      in_b  = ($urandom_range(0, 15) == 0) ? 8'd0 : 8'($urandom);
      q.push_back('{in_op, in_a, in_b, expect_result(in_op, in_a, in_b), cycle});
      @(negedge clk);
      if (i >= 4096 && $urandom_range(0, 3) == 0) begin
        in_valid = 1'b0;
        repeat ($urandom_range(1, 5)) @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d headers never came out", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
