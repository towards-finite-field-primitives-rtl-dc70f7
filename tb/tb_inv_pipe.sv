// tb_inv_pipe: exhaustive check of the unrolled inverter.
//
// All 256 elements of GF(2^8) and all 16 of GF(2^4) (x^4 + x + 1) are sent
// back to back. For x != 0 the result times x must be 1 under
// gf_ref_pkg::ref_mul, and must equal the inverse found by search; 0 must give
// 0. Each result must appear exactly 2N cycles after its operand, with its
// tag. The worked example 223^-1 = 107 is checked by name. A watchdog ends
// the run with a failure if it stalls.
module tb_inv_pipe;
  import gf_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic        v8_in, v8_out;
  logic [7:0]  x8, r8;
  logic [31:0] t8_in, t8_out;
  inv_pipe #(.TAG_W(32)) dut8 (
    .clk, .rst_n, .in_valid(v8_in), .in_x(x8), .in_tag(t8_in),
    .out_valid(v8_out), .out_inverse(r8), .out_tag(t8_out));

  logic        v4_in, v4_out;
  logic [3:0]  x4, r4;
  logic [31:0] t4_in, t4_out;
  inv_pipe #(.N(4), .POLY(5'h13), .TAG_W(32)) dut4 (
    .clk, .rst_n, .in_valid(v4_in), .in_x(x4), .in_tag(t4_in),
    .out_valid(v4_out), .out_inverse(r4), .out_tag(t4_out));

  int seen8 = 0, seen4 = 0;
  always @(posedge clk) begin
    if (rst_n && v8_out) begin
      automatic logic [7:0] ex = t8_out[31:24];
      automatic logic [7:0] exp_r = 8'(ref_inv(ex, 8, 'h11B));
      checks++;
      if (r8 !== exp_r || (ex != 0 && ref_mul(ex, r8, 8, 'h11B) != 1) ||
          16'(cycle - int'(t8_out[15:0])) != 16'd16) begin
        failures++;
        if (failures < 10) $display("FAIL gf8 inv(%0d) got %0d exp %0d", ex, r8, exp_r);
      end
      if (ex == 8'd223) begin
        checks++;
        if (r8 != 8'd107) failures++;
      end
      seen8++;
    end
    if (rst_n && v4_out) begin
      automatic logic [3:0] ex = t4_out[31:28];
      automatic logic [3:0] exp_r = 4'(ref_inv(ex, 4, 'h13));
      checks++;
      if (r4 !== exp_r || 16'(cycle - int'(t4_out[15:0])) != 16'd8) begin
        failures++;
        if (failures < 10) $display("FAIL gf4 inv(%0d) got %0d exp %0d", ex, r4, exp_r);
      end
      seen4++;
    end
  end

  initial begin
    v8_in = 0; v4_in = 0; x8 = 0; x4 = 0; t8_in = 0; t4_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      v8_in = 1'b1;
      x8 = 8'(i);
      t8_in = {x8, 8'd0, 16'(cycle)};
      if (i < 16) begin
        v4_in = 1'b1;
        x4 = 4'(i);
        t4_in = {x4, 12'd0, 16'(cycle)};
      end else v4_in = 1'b0;
      @(negedge clk);
    end
    v8_in = 0; v4_in = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (seen8 != 256 || seen4 != 16) begin
      failures++;
      $display("FAIL: %0d / %0d results seen", seen8, seen4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
