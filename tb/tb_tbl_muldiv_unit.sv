// tb_tbl_muldiv_unit: exhaustive check of the table-based unit.
//
// All 65536 operand pairs are streamed back to back three times, once for
// each op (00 multiply, 01 divide, 11 invert b), interleaving nothing else.
// Results are compared with gf_ref_pkg (multiplication by carry-less product
// and long-division reduction, inverse by search); zero operands and
// division by zero must give 0. Each result must leave exactly 4 cycles after
// its operands, with its tag. The worked example 10 * 25 = 250 (log sum 0x8c)
// is checked by name. A watchdog ends the run with a failure if it stalls.
module tb_tbl_muldiv_unit;
  import gf_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [7:0] inv8 [256];

  logic        v_in, v_out;
  logic [1:0]  op;
  logic [7:0]  a, b, r;
  logic [33:0] t_in, t_out;

  tbl_muldiv_unit #(.TAG_W(34)) dut (
    .clk, .rst_n, .in_valid(v_in), .in_op(op), .in_a(a), .in_b(b), .in_tag(t_in),
    .out_valid(v_out), .out_result(r), .out_tag(t_out));

  int seen = 0;
  always @(posedge clk) begin
    if (rst_n && v_out) begin
      automatic logic [1:0] eo = t_out[33:32];
      automatic logic [7:0] ea = t_out[31:24], eb = t_out[23:16];
      automatic logic [7:0] exp_r;
      case (eo)
        2'b01:   exp_r = 8'(ref_mul(ea, inv8[eb], 8, 'h11B));
        2'b11:   exp_r = inv8[eb];
        default: exp_r = 8'(ref_mul(ea, eb, 8, 'h11B));
      endcase
      checks++;
      if (r !== exp_r || 16'(cycle - int'(t_out[15:0])) != 16'd4) begin
        failures++;
        if (failures < 10) $display("FAIL op%0d a=%0d b=%0d got %0d exp %0d lat %0d",
                                    eo, ea, eb, r, exp_r, 16'(cycle - int'(t_out[15:0])));
      end
      if (eo == 2'b00 && ea == 10 && eb == 25) begin
        checks++;
        if (r != 8'd250) failures++;
      end
      seen++;
    end
  end

  initial begin
    v_in = 0; op = 0; a = 0; b = 0; t_in = 0;
    for (int i = 0; i < 256; i++) inv8[i] = 8'(ref_inv(i, 8, 'h11B));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int o = 0; o < 3; o++) begin
      for (int i = 0; i < 65536; i++) begin
        v_in = 1'b1;
        op = (o == 0) ? 2'b00 : (o == 1) ? 2'b01 : 2'b11;
        a = 8'(i >> 8);
        b = 8'(i);
        t_in = {op, a, b, 16'(cycle)};
        @(negedge clk);
      end
    end
    v_in = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (seen != 3 * 65536) begin
      failures++;
      $display("FAIL: %0d results seen", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
