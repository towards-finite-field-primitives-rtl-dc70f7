// tb_ebd_div_pipe: exhaustive check of the unrolled EBd divider.
//
// The default GF(2^8) instance gets all 65536 (a, b) pairs back to back, one
// per cycle; a GF(2^3) instance (x^3 + x + 1) gets all 64 pairs. For b != 0
// the quotient must equal gf_ref_pkg::ref_div(a, b) (a times the inverse of b
// found by search); for b = 0 it must be 0. Each quotient must appear
// exactly 2N-1 cycles after its operands, with its tag. A watchdog ends the
// run with a failure if it stalls.
module tb_ebd_div_pipe;
  import gf_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Inverse tables of the reference, built once (the search is slow).
  logic [7:0] inv8 [256];
  logic [2:0] inv3 [8];

  logic        v8_in, v8_out;
  logic [7:0]  a8, b8, q8;
  logic [31:0] t8_in, t8_out;
  ebd_div_pipe #(.TAG_W(32)) dut8 (
    .clk, .rst_n, .in_valid(v8_in), .in_a(a8), .in_b(b8), .in_tag(t8_in),
    .out_valid(v8_out), .out_quotient(q8), .out_tag(t8_out));

  logic        v3_in, v3_out;
  logic [2:0]  a3, b3, q3;
  logic [31:0] t3_in, t3_out;
  ebd_div_pipe #(.N(3), .POLY(4'hB), .TAG_W(32)) dut3 (
    .clk, .rst_n, .in_valid(v3_in), .in_a(a3), .in_b(b3), .in_tag(t3_in),
    .out_valid(v3_out), .out_quotient(q3), .out_tag(t3_out));

  int seen8 = 0, seen3 = 0;
  always @(posedge clk) begin
    if (rst_n && v8_out) begin
      automatic logic [7:0] ea = t8_out[31:24], eb = t8_out[23:16];
      automatic logic [7:0] exp_q = (eb == 0) ? 8'd0 : 8'(ref_mul(ea, inv8[eb], 8, 'h11B));
      checks++;
      if (q8 !== exp_q || 16'(cycle - int'(t8_out[15:0])) != 16'd15) begin
        failures++;
        if (failures < 10) $display("FAIL gf8 %0d/%0d got %0d exp %0d", ea, eb, q8, exp_q);
      end
      seen8++;
    end
    if (rst_n && v3_out) begin
      automatic logic [2:0] ea = t3_out[31:29], eb = t3_out[28:26];
      automatic logic [2:0] exp_q = (eb == 0) ? 3'd0 : 3'(ref_mul(ea, inv3[eb], 3, 'hB));
      checks++;
      if (q3 !== exp_q || 16'(cycle - int'(t3_out[15:0])) != 16'd5) begin
        failures++;
        if (failures < 10) $display("FAIL gf3 %0d/%0d got %0d exp %0d", ea, eb, q3, exp_q);
      end
      seen3++;
    end
  end

  initial begin
    v8_in = 0; v3_in = 0; a8 = 0; b8 = 0; a3 = 0; b3 = 0; t8_in = 0; t3_in = 0;
    for (int i = 0; i < 256; i++) inv8[i] = 8'(ref_inv(i, 8, 'h11B));
    for (int i = 0; i < 8; i++)   inv3[i] = 3'(ref_inv(i, 3, 'hB));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 65536; i++) begin
      v8_in = 1'b1;
      a8 = 8'(i >> 8);
      b8 = 8'(i);
      t8_in = {a8, b8, 16'(cycle)};
      if (i < 64) begin
        v3_in = 1'b1;
        a3 = 3'(i >> 3);
        b3 = 3'(i);
        t3_in = {a3, b3, 10'd0, 16'(cycle)};
      end else v3_in = 1'b0;
      @(negedge clk);
    end
    v8_in = 0; v3_in = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (seen8 != 65536 || seen3 != 64) begin
      failures++;
      $display("FAIL: %0d / %0d results seen", seen8, seen3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
