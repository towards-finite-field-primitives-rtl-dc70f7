// tb_multi_mul_tbl: random headers through the table-based multi-multiplication
// unit at its default size (K = 15 pairs of GF(2^8) operands).
//
// 2048 headers with random operands (zeros forced now and then), the first
// half back to back and the rest with random gaps. Every product must equal
// gf_ref_pkg::ref_mul of its pair, and each header's results must appear
// exactly 3 cycles after it entered, in order. A watchdog ends the run
// with a failure if it stalls.
module tb_multi_mul_tbl;
  import gf_ref_pkg::*;

  localparam int K   = 15;
  localparam int LAT = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic       in_valid, out_valid;
  logic [7:0] in_a [K];
  logic [7:0] in_b [K];
  logic [7:0] out_result [K];

  multi_mul_tbl dut (.clk, .rst_n, .in_valid, .in_a, .in_b, .out_valid, .out_result);

  typedef struct { logic [7:0] p [K]; int t; } exp_t;
  exp_t q[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (q.size() == 0) begin
        checks++;
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        automatic exp_t e = q.pop_front();
        checks++;
        if (cycle - e.t != LAT) begin
          failures++;
          $display("FAIL latency %0d", cycle - e.t);
        end
        for (int j = 0; j < K; j++) begin
          checks++;
          if (out_result[j] !== e.p[j]) begin
            failures++;
            if (failures < 10) $display("FAIL lane %0d got %0d exp %0d", j, out_result[j], e.p[j]);
          end
        end
      end
    end
  end

  initial begin
    automatic exp_t e;
    in_valid = 0;
    for (int j = 0; j < K; j++) begin in_a[j] = 0; in_b[j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 2048; i++) begin
      in_valid = 1'b1;
      for (int j = 0; j < K; j++) begin
        in_a[j] = ($urandom_range(0, 15) == 0) ? 8'd0 : 8'($urandom);
        in_b[j] = ($urandom_range(0, 15) == 0) ? 8'd0 : 8'($urandom);
        e.p[j] = 8'(ref_mul(in_a[j], in_b[j], 8, 'h11B));
      end
      e.t = cycle;
      q.push_back(e);
      @(negedge clk);
      if (i >= 1024 && $urandom_range(0, 3) == 0) begin
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
