// tb_rns_fwd_conv: self-check of the binary-to-residue converter.
// Every 8-bit input is converted for n = 4 and n = 6, and every 12-bit input
// for n = 4 (three digits, so the folding loops are exercised); each residue
// is compared with x mod m from integer arithmetic.  Watchdog by time-out.
module tb_rns_fwd_conv;
  import rns_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  x8;
  logic [11:0] x12;
  logic [3:0]  a_lo, a_mid, c_lo, c_mid;
  logic [4:0]  a_hi, c_hi;
  logic [5:0]  b_lo, b_mid;
  logic [6:0]  b_hi;

  rns_fwd_conv #(.N(4), .W(8))  dut_a (.x(x8),  .r_lo(a_lo), .r_mid(a_mid), .r_hi(a_hi));
  rns_fwd_conv #(.N(6), .W(8))  dut_b (.x(x8),  .r_lo(b_lo), .r_mid(b_mid), .r_hi(b_hi));
  rns_fwd_conv #(.N(4), .W(12)) dut_c (.x(x12), .r_lo(c_lo), .r_mid(c_mid), .r_hi(c_hi));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      x8 = 8'(v); x12 = '0;
      #1;
      check($sformatf("n4 mod15 of %0d", v), int'(a_lo),  v % 15);
      check($sformatf("n4 mod16 of %0d", v), int'(a_mid), v % 16);
      check($sformatf("n4 mod17 of %0d", v), int'(a_hi),  v % 17);
      check($sformatf("n6 mod63 of %0d", v), int'(b_lo),  v % 63);
      check($sformatf("n6 mod64 of %0d", v), int'(b_mid), v % 64);
      check($sformatf("n6 mod65 of %0d", v), int'(b_hi),  v % 65);
    end
    for (int v = 0; v < 4096; v++) begin
      x12 = 12'(v);
      #1;
      check($sformatf("w12 mod15 of %0d", v), int'(c_lo),  v % 15);
      check($sformatf("w12 mod16 of %0d", v), int'(c_mid), v % 16);
      check($sformatf("w12 mod17 of %0d", v), int'(c_hi),  v % 17);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
