// tb_rns_rev_conv: exhaustive self-check of the residue-to-binary converter.
// Every X in the dynamic range, [0, 4080) for n = 4 and [0, 262080) for
// n = 6, is turned into residues with integer arithmetic and must come back
// unchanged.  Watchdog by time-out.
module tb_rns_rev_conv;
  import rns_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0]  a_lo, a_mid;
  logic [4:0]  a_hi;
  logic [11:0] a_x;
  logic [5:0]  b_lo, b_mid;
  logic [6:0]  b_hi;
  logic [17:0] b_x;

  rns_rev_conv #(.N(4)) dut_a (.r_lo(a_lo), .r_mid(a_mid), .r_hi(a_hi), .x(a_x));
  rns_rev_conv #(.N(6)) dut_b (.r_lo(b_lo), .r_mid(b_mid), .r_hi(b_hi), .x(b_x));

  initial begin
    b_lo = '0; b_mid = '0; b_hi = '0;
    for (int v = 0; v < 4080; v++) begin
      a_lo = 4'(v % 15); a_mid = 4'(v % 16); a_hi = 5'(v % 17);
      #1;
      checks++;
      if (int'(a_x) != v) begin
        failures++;
        if (failures < 10) $display("FAIL n=4 X=%0d got %0d", v, a_x);
      end
    end
    for (int v = 0; v < 262080; v++) begin
      b_lo = 6'(v % 63); b_mid = 6'(v % 64); b_hi = 7'(v % 65);
      #1;
      checks++;
      if (int'(b_x) != v) begin
        failures++;
        if (failures < 10) $display("FAIL n=6 X=%0d got %0d", v, b_x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
