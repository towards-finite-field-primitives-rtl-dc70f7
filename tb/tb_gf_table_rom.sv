// tb_gf_table_rom: checks the computed log, antilog and inverse tables.
//
// For GF(2^8) (0x11B, generator 0x03) every address of the three tables is
// read and compared with values found independently: the discrete log by
// search over powers of the generator, the antilog by repeated ref_mul, the
// inverse by search. A sample of entries is also compared with the printed
// tables of this field (log[0x0a] = 0x1b, log[0x19] = 0x71, antilog[0x8c] =
// 0xfa, inv[0xdf] = 0x6b, ...). A GF(2^4) log/antilog pair (x^4 + x + 1,
// generator x + 1) is checked the same way. Data must follow the address by
// one clock.
module tb_gf_table_rom;
  import gf_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0] addr8, lg8, al8, iv8;
  logic [3:0] addr4, lg4, al4;

  gf_table_rom #(.KIND(gf_pkg::TBL_LOG))     u_log (.clk, .addr(addr8), .data(lg8));
  gf_table_rom #(.KIND(gf_pkg::TBL_ANTILOG)) u_al  (.clk, .addr(addr8), .data(al8));
  gf_table_rom #(.KIND(gf_pkg::TBL_INV))     u_inv (.clk, .addr(addr8), .data(iv8));
  gf_table_rom #(.N(4), .POLY(5'h13), .GEN(4'h3), .KIND(gf_pkg::TBL_LOG))     u_log4 (
    .clk, .addr(addr4), .data(lg4));
  gf_table_rom #(.N(4), .POLY(5'h13), .GEN(4'h3), .KIND(gf_pkg::TBL_ANTILOG)) u_al4 (
    .clk, .addr(addr4), .data(al4));

  task automatic check(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 12) $display("FAIL %s got %02x exp %02x", what, got, exp_v);
    end
  endtask

  // Entries copied from the printed GF(2^8) tables.
  task automatic printed(input int a);
    case (a)
      8'h0a: begin check("log 0a", lg8, 8'h1b); end
      8'h19: begin check("log 19", lg8, 8'h71); end
      8'h02: begin check("log 02", lg8, 8'h19); check("inv 02", iv8, 8'h8d); end
      8'hff: begin check("log ff", lg8, 8'h07); check("al ff", al8, 8'h01); end
      8'h8c: begin check("al 8c", al8, 8'hfa); end
      8'h00: begin check("al 00", al8, 8'h01); end
      8'h10: begin check("al 10", al8, 8'h5f); check("inv 10", iv8, 8'h74); end
      8'hdf: begin check("inv df", iv8, 8'h6b); end
      8'h53: begin check("inv 53", iv8, 8'hca); check("log 53", lg8, 8'h30); end
      default: ;
    endcase
  endtask

  longint unsigned pw;
  initial begin
    addr8 = 0; addr4 = 0;
    pw = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      addr8 = 8'(i);
      addr4 = 4'(i);
      @(negedge clk);   // one clock later the data is there
      if (i != 0) check("log", lg8, ref_log(i, 3, 8, 'h11B));
      check("antilog", al8, (i == 255) ? 1 : int'(pw));
      check("inv", iv8, int'(ref_inv(i, 8, 'h11B)));
      printed(i);
      if (i < 16) begin
        if (i != 0) check("log4", lg4, ref_log(i, 3, 4, 'h13));
        check("antilog4", al4, (i == 15) ? 1 : ref_mul_pow(i));
      end
      pw = ref_mul(pw, 3, 8, 'h11B);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_mul_pow(input int e);
    longint unsigned p = 1;
    for (int k = 0; k < e; k++) p = ref_mul(p, 3, 4, 'h13);
    return int'(p);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
