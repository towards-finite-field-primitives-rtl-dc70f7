// tb_ff_switch_top: end-to-end run of the whole design at its default
// parameters (GF(2^8), 15 table multiplications and 9 RPA multiplications per
// multi-multiplication header).
//
// Each of the three units receives 1024 random headers while the others are
// busy too; the single-operation stream carries all seven op codes and a few
// undefined ones. The first half of each stream is back to back (line rate),
// the second half has random idle gaps. Results are compared with gf_ref_pkg
// and latencies with the fixed values 25 (header unit), 3 (table
// multi-multiplication) and 8 (RPA multi-multiplication). A few worked
// examples are sent by name: 10 * 25 = 250 with both approaches, 223^-1 = 107
// with both approaches.
//
// The run also counts, from an independent model of each algorithm's control
// flow, how often each mechanism was exercised, and counts a failure for any
// that never was: every op code, the undefined-op path, the log-sum
// wrap-around of the table approach and its absence, a zero operand, division
// by zero, polynomial reduction inside a multiplication, the exchange and
// plain-XOR branches of EBd, the exchange and shift branches of the
// inversion, back-to-back headers and idle gaps.
module tb_ff_switch_top;
  import gf_ref_pkg::*;
  import gf_pkg::*;

  localparam int KT = 15, KR = 9;
  localparam int LAT_C = 25, LAT_T = 3, LAT_R = 8;
  localparam int NPKT = 1024;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [7:0] inv8 [256];
  int         log8 [256];

  // ---- DUT
  logic       c_iv, c_ov;
  logic [7:0] c_iop, c_ia, c_ib, c_oop, c_oa, c_ob, c_or;
  logic       t_iv, t_ov, r_iv, r_ov;
  logic [7:0] t_ia [KT], t_ib [KT], t_or [KT];
  logic [7:0] r_ia [KR], r_ib [KR], r_or [KR];

  ff_switch_top dut (
    .clk, .rst_n,
    .calc_in_valid(c_iv), .calc_in_op(c_iop), .calc_in_a(c_ia), .calc_in_b(c_ib),
    .calc_out_valid(c_ov), .calc_out_op(c_oop), .calc_out_a(c_oa), .calc_out_b(c_ob),
    .calc_out_result(c_or),
    .mtbl_in_valid(t_iv), .mtbl_in_a(t_ia), .mtbl_in_b(t_ib),
    .mtbl_out_valid(t_ov), .mtbl_out_result(t_or),
    .mrpa_in_valid(r_iv), .mrpa_in_a(r_ia), .mrpa_in_b(r_ib),
    .mrpa_out_valid(r_ov), .mrpa_out_result(r_or));

  // ---- mechanism counters
  bit c_done = 0, t_done = 0, r_done = 0;
  int n_op [8];
  int n_undef, n_wrap, n_nowrap, n_zero, n_div0, n_reduce, n_ebd_swap, n_ebd_plain;
  int n_inv_swap, n_inv_other, n_b2b, n_gap, n_mt_lanes, n_mr_lanes;

  function automatic logic [7:0] expect_result(input logic [7:0] o, input logic [7:0] a,
                                               input logic [7:0] b);
    case (o)
      OP_MUL_TBL, OP_MUL_RPA:                 return 8'(ref_mul(a, b, 8, 'h11B));
      OP_DIV_TBL, OP_DIV_EBD, OP_DIV_INV_RPA: return 8'(ref_mul(a, inv8[b], 8, 'h11B));
      OP_INV_TBL, OP_INV_ALG:                 return inv8[b];
      default:                                return 8'd0;
    endcase
  endfunction

  task automatic count_mechanisms(input logic [7:0] o, input logic [7:0] a, input logic [7:0] b);
    int s, p;
    logic [7:0] bb;
    if (o <= 8'h07 && o != 8'h02) n_op[o[2:0]]++;
    else n_undef++;
    if (a == 0 || b == 0) n_zero++;
    if (b == 0 && (o == OP_DIV_TBL || o == OP_DIV_EBD || o == OP_DIV_INV_RPA)) n_div0++;
    if (o == OP_MUL_TBL || o == OP_DIV_TBL) begin
      bb = (o == OP_DIV_TBL) ? inv8[b] : b;
      if (a != 0 && bb != 0) begin
        if (log8[a] + log8[bb] >= 255) n_wrap++;
        else n_nowrap++;
      end
    end
    if (o == OP_MUL_RPA && a != 0 && b != 0 && degree(64'(a)) + degree(64'(b)) >= 8) n_reduce++;
    if (o == OP_DIV_INV_RPA && a != 0 && b != 0 && degree(64'(a)) + degree(64'(inv8[b])) >= 8) n_reduce++;
    if (o == OP_DIV_EBD) begin
      ebd_branches(64'(b), 8, 'h11B, s, p);
      n_ebd_swap += s;
      n_ebd_plain += p;
    end
    if (o == OP_INV_ALG || o == OP_DIV_INV_RPA) begin
      inv_branches(64'(b), 8, 'h11B, s, p);
      n_inv_swap += s;
      n_inv_other += p;
    end
  endtask

  // ---- scoreboards
  typedef struct { logic [7:0] op, a, b, r; int t; } cexp_t;
  typedef struct { logic [7:0] p [KT]; int t; } texp_t;
  typedef struct { logic [7:0] p [KR]; int t; } rexp_t;
  cexp_t cq[$];
  texp_t tq[$];
  rexp_t rq[$];

  always @(posedge clk) begin
    if (rst_n && c_ov) begin
      checks++;
      if (cq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected header output");
      end else begin
        automatic cexp_t e = cq.pop_front();
        if (c_oop !== e.op || c_oa !== e.a || c_ob !== e.b || c_or !== e.r ||
            cycle - e.t != LAT_C) begin
          failures++;
          if (failures < 10)
            $display("FAIL calc op=%02x a=%0d b=%0d got %0d exp %0d lat %0d",
                     e.op, e.a, e.b, c_or, e.r, cycle - e.t);
        end
      end
    end
    if (rst_n && t_ov) begin
      checks++;
      if (tq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected mtbl output");
      end else begin
        automatic texp_t e = tq.pop_front();
        if (cycle - e.t != LAT_T) failures++;
        for (int j = 0; j < KT; j++) begin
          checks++;
          if (t_or[j] !== e.p[j]) begin
            failures++;
            if (failures < 10) $display("FAIL mtbl lane %0d", j);
          end
          n_mt_lanes++;
        end
      end
    end
    if (rst_n && r_ov) begin
      checks++;
      if (rq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected mrpa output");
      end else begin
        automatic rexp_t e = rq.pop_front();
        if (cycle - e.t != LAT_R) failures++;
        for (int j = 0; j < KR; j++) begin
          checks++;
          if (r_or[j] !== e.p[j]) begin
            failures++;
            if (failures < 10) $display("FAIL mrpa lane %0d", j);
          end
          n_mr_lanes++;
        end
      end
    end
  end

  // ---- stimulus
  logic [7:0] ops [10] = '{8'h00, 8'h01, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h02, 8'h08, 8'hff};
  logic [7:0] dir_op [4] = '{8'h00, 8'h04, 8'h03, 8'h07};
  logic [7:0] dir_a  [4] = '{8'd10, 8'd10, 8'd0, 8'd0};
  logic [7:0] dir_b  [4] = '{8'd25, 8'd25, 8'd223, 8'd223};
  logic [7:0] dir_r  [4] = '{8'd250, 8'd250, 8'd107, 8'd107};

  task automatic send_calc(input logic [7:0] o, input logic [7:0] a, input logic [7:0] b);
    c_iv = 1'b1; c_iop = o; c_ia = a; c_ib = b;
    count_mechanisms(o, a, b);
    cq.push_back('{o, a, b, expect_result(o, a, b), cycle});
  endtask

  initial begin : calc_stream
    c_iv = 0; c_iop = 0; c_ia = 0; c_ib = 0;
    wait (rst_n);
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (expect_result(dir_op[i], dir_a[i], dir_b[i]) != dir_r[i]) failures++;
      send_calc(dir_op[i], dir_a[i], dir_b[i]);
      n_b2b++;
      @(negedge clk);
    end
    for (int i = 0; i < NPKT; i++) begin
      send_calc(($urandom_range(0, 19) == 0) ? ops[$urandom_range(7, 9)] : ops[$urandom_range(0, 6)],
                ($urandom_range(0, 15) == 0) ? 8'd0 : 8'($urandom),
                ($urandom_range(0, 15) == 0) ? 8'd0 : 8'($urandom));
      @(negedge clk);
      if (i >= NPKT / 2 && $urandom_range(0, 3) == 0) begin
        c_iv = 1'b0;
        n_gap++;
        repeat ($urandom_range(1, 5)) @(negedge clk);
      end else n_b2b++;
    end
    c_iv = 0;
    c_done = 1;
  end

  initial begin : mtbl_stream
    automatic texp_t e;
    t_iv = 0;
    for (int j = 0; j < KT; j++) begin t_ia[j] = 0; t_ib[j] = 0; end
    wait (rst_n);
    @(negedge clk);
    for (int i = 0; i < NPKT; i++) begin
      t_iv = 1'b1;
      for (int j = 0; j < KT; j++) begin
        t_ia[j] = ($urandom_range(0, 15) == 0) ? 8'd0 : 8'($urandom);
        t_ib[j] = 8'($urandom);
        e.p[j] = 8'(ref_mul(t_ia[j], t_ib[j], 8, 'h11B));
      end
      e.t = cycle;
      tq.push_back(e);
      @(negedge clk);
      if (i >= NPKT / 2 && $urandom_range(0, 3) == 0) begin
        t_iv = 1'b0;
        repeat ($urandom_range(1, 5)) @(negedge clk);
      end
    end
    t_iv = 0;
    t_done = 1;
  end

  initial begin : mrpa_stream
    automatic rexp_t e;
    r_iv = 0;
    for (int j = 0; j < KR; j++) begin r_ia[j] = 0; r_ib[j] = 0; end
    wait (rst_n);
    @(negedge clk);
    for (int i = 0; i < NPKT; i++) begin
      r_iv = 1'b1;
      for (int j = 0; j < KR; j++) begin
        r_ia[j] = 8'($urandom);
        r_ib[j] = ($urandom_range(0, 15) == 0) ? 8'd0 : 8'($urandom);
        e.p[j] = 8'(ref_mul(r_ia[j], r_ib[j], 8, 'h11B));
      end
      e.t = cycle;
      rq.push_back(e);
      @(negedge clk);
      if (i >= NPKT / 2 && $urandom_range(0, 3) == 0) begin
        r_iv = 1'b0;
        repeat ($urandom_range(1, 5)) @(negedge clk);
      end
    end
    r_iv = 0;
    r_done = 1;
  end

  task automatic need(input string what, input int n);
    $display("  %-28s %0d", what, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end
  endtask

  initial begin : main
    for (int i = 0; i < 256; i++) begin
      inv8[i] = 8'(ref_inv(i, 8, 'h11B));
      log8[i] = (i == 0) ? 0 : ref_log(64'(i), 3, 8, 'h11B);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (c_done && t_done && r_done);
    repeat (LAT_C + 5) @(negedge clk);
    checks++;
    if (cq.size() != 0 || tq.size() != 0 || rq.size() != 0) begin
      failures++;
      $display("FAIL: outputs missing %0d %0d %0d", cq.size(), tq.size(), rq.size());
    end
    $display("mechanisms exercised:");
    need("op 00 multiply, table", n_op[0]);
    need("op 01 divide, table", n_op[1]);
    need("op 03 invert, table", n_op[3]);
    need("op 04 multiply, RPA", n_op[4]);
    need("op 05 divide, EBd", n_op[5]);
    need("op 06 divide, inv+RPA", n_op[6]);
    need("op 07 invert, iterative", n_op[7]);
    need("undefined op", n_undef);
    need("log sum wrap-around", n_wrap);
    need("log sum without wrap", n_nowrap);
    need("zero operand", n_zero);
    need("division by zero", n_div0);
    need("polynomial reduction", n_reduce);
    need("EBd exchange branch", n_ebd_swap);
    need("EBd plain XOR branch", n_ebd_plain);
    need("inversion exchange branch", n_inv_swap);
    need("inversion shift branch", n_inv_other);
    need("back-to-back headers", n_b2b);
    need("idle gaps", n_gap);
    need("table multi-mul products", n_mt_lanes);
    need("RPA multi-mul products", n_mr_lanes);
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
