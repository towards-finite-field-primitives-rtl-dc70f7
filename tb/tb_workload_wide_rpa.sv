// tb_workload_wide_rpa: the iterative multiplier at large field sizes.
//
// rpa_mul_pipe is instantiated for GF(2^32) (x^32 + x^7 + x^3 + x^2 + 1, a
// size extrapolated for the reconfigurable switch target), GF(2^56)
// (x^56 + x^8 + x^3 + x^2 + 1, the largest multiplication field reported for
// that target) and GF(2^128) (x^128 + x^7 + x^2 + x + 1, the AES-GCM field).
// The three polynomials are standard low-weight irreducible ones, not taken
// from the source design.
// 512 random operand pairs, plus multiplications by 0 and 1, are streamed
// back to back into each; every product is compared with
// gf_ref_pkg::ref_mul_wide and must arrive exactly N cycles after its
// operands. A watchdog ends the run with a failure if it stalls.
module tb_workload_wide_rpa;
  import gf_ref_pkg::*;

  localparam logic [32:0]  P32  = (33'd1 << 32) | 33'h8D;
  localparam logic [56:0]  P56  = (57'd1 << 56) | 57'h10D;
  localparam logic [128:0] P128 = (129'd1 << 128) | 129'h87;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic         v_in, v32, v56, v128;
  logic [31:0]  a32, b32, p32;
  logic [55:0]  a56, b56, p56;
  logic [127:0] a128, b128, p128;
  logic [31:0]  t_in, t32, t56, t128;

  rpa_mul_pipe #(.N(32), .POLY(P32), .TAG_W(32)) dut32 (
    .clk, .rst_n, .in_valid(v_in), .in_a(a32), .in_b(b32), .in_tag(t_in),
    .out_valid(v32), .out_product(p32), .out_tag(t32));
  rpa_mul_pipe #(.N(56), .POLY(P56), .TAG_W(32)) dut56 (
    .clk, .rst_n, .in_valid(v_in), .in_a(a56), .in_b(b56), .in_tag(t_in),
    .out_valid(v56), .out_product(p56), .out_tag(t56));
  rpa_mul_pipe #(.N(128), .POLY(P128), .TAG_W(32)) dut128 (
    .clk, .rst_n, .in_valid(v_in), .in_a(a128), .in_b(b128), .in_tag(t_in),
    .out_valid(v128), .out_product(p128), .out_tag(t128));

  typedef struct { logic [31:0] p32; logic [55:0] p56; logic [127:0] p128; int t; } exp_t;
  exp_t q32[$], q56[$], q128[$];

  always @(posedge clk) begin
    if (rst_n && v32) begin
      automatic exp_t e = q32.pop_front();
      checks++;
      if (p32 !== e.p32 || cycle - e.t != 32) begin
        failures++;
        if (failures < 6) $display("FAIL gf32 got %h exp %h", p32, e.p32);
      end
    end
    if (rst_n && v56) begin
      automatic exp_t e = q56.pop_front();
      checks++;
      if (p56 !== e.p56 || cycle - e.t != 56) begin
        failures++;
        if (failures < 6) $display("FAIL gf56 got %h exp %h", p56, e.p56);
      end
    end
    if (rst_n && v128) begin
      automatic exp_t e = q128.pop_front();
      checks++;
      if (p128 !== e.p128 || cycle - e.t != 128) begin
        failures++;
        if (failures < 6) $display("FAIL gf128 got %h exp %h", p128, e.p128);
      end
    end
  end

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    automatic exp_t e;
    v_in = 0; a32 = 0; b32 = 0; a56 = 0; b56 = 0; a128 = 0; b128 = 0; t_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 514; i++) begin
      v_in = 1'b1;
      a128 = rnd128();
      b128 = (i == 0) ? 128'd0 : (i == 1) ? 128'd1 : rnd128();
      a32  = a128[31:0];
      b32  = b128[31:0];
      a56  = a128[55:0];
      b56  = b128[55:0];
      e.p32  = 32'(ref_mul_wide(128'(a32), 128'(b32), 32, 129'(P32)));
      e.p56  = 56'(ref_mul_wide(128'(a56), 128'(b56), 56, 129'(P56)));
      e.p128 = ref_mul_wide(a128, b128, 128, P128);
      e.t = cycle;
      q32.push_back(e);
      q56.push_back(e);
      q128.push_back(e);
      @(negedge clk);
    end
    v_in = 0;
    repeat (140) @(negedge clk);
    checks++;
    if (q32.size() != 0 || q56.size() != 0 || q128.size() != 0) begin
      failures++;
      $display("FAIL: results missing");
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
