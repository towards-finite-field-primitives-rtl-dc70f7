// tb_rpa_mul_pipe: exhaustive check of the unrolled RPA multiplier.
//
// The default GF(2^8) instance gets all 65536 operand pairs back to back, one
// per cycle; a GF(2^3) instance (x^3 + x + 1) gets all 64 pairs. Every product
// is compared with gf_ref_pkg::ref_mul, the tag must come back with it, and
// each result must appear exactly N cycles after its operands (line rate,
// one iteration per stage). The worked example 10 * 25 = 250 is checked by
// name. A watchdog ends the run with a failure if it stalls.
module tb_rpa_mul_pipe;
  import gf_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- GF(2^8) instance
  logic        v8_in, v8_out;
  logic [7:0]  a8, b8, p8;
  logic [31:0] t8_in, t8_out;

  rpa_mul_pipe #(.TAG_W(32)) dut8 (
    .clk, .rst_n, .in_valid(v8_in), .in_a(a8), .in_b(b8), .in_tag(t8_in),
    .out_valid(v8_out), .out_product(p8), .out_tag(t8_out));

  // ---- GF(2^3) instance
  logic        v3_in, v3_out;
  logic [2:0]  a3, b3, p3;
  logic [31:0] t3_in, t3_out;

  rpa_mul_pipe #(.N(3), .POLY(4'hB), .TAG_W(32)) dut3 (
    .clk, .rst_n, .in_valid(v3_in), .in_a(a3), .in_b(b3), .in_tag(t3_in),
    .out_valid(v3_out), .out_product(p3), .out_tag(t3_out));

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Tag = issue cycle (low 16 bits) and operands (high 16 bits).
  int seen8 = 0, seen3 = 0;
  always @(posedge clk) begin
    if (rst_n && v8_out) begin
      automatic logic [7:0] ea = t8_out[31:24], eb = t8_out[23:16];
      automatic logic [7:0] exp_p = 8'(ref_mul(ea, eb, 8, 'h11B));
      checks++;
      if (p8 !== exp_p || 16'(cycle - int'(t8_out[15:0])) != 16'd8) begin
        failures++;
        if (failures < 10)
          $display("FAIL gf8 %0d*%0d got %0d exp %0d latency %0d", ea, eb, p8, exp_p,
                   cycle - int'(t8_out[15:0]));
      end
      if (ea == 10 && eb == 25) begin
        checks++;
        if (p8 != 8'd250) failures++;
      end
      seen8++;
    end
    if (rst_n && v3_out) begin
      automatic logic [2:0] ea = t3_out[31:29], eb = t3_out[28:26];
      automatic logic [2:0] exp_p = 3'(ref_mul(ea, eb, 3, 'hB));
      checks++;
      if (p3 !== exp_p || 16'(cycle - int'(t3_out[15:0])) != 16'd3) begin
        failures++;
        $display("FAIL gf3 %0d*%0d got %0d exp %0d", ea, eb, p3, exp_p);
      end
      seen3++;
    end
  end

  initial begin
    v8_in = 0; v3_in = 0; a8 = 0; b8 = 0; a3 = 0; b3 = 0; t8_in = 0; t3_in = 0;
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
    repeat (20) @(negedge clk);
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
