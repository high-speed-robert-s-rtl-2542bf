// tb_isqrt: exhaustive self-check of the integer square root for W = 18:
// for every x, root^2 <= x < (root+1)^2.  Watchdog by time-out.
module tb_isqrt;
  int checks = 0, failures = 0;
  logic [17:0] x;
  logic [8:0]  root;

  isqrt #(.W(18)) dut (.x, .root);

  initial begin
    longint r;
    for (int v = 0; v < (1 << 18); v++) begin
      x = 18'(v);
      #1;
      r = longint'(root);
      checks++;
      if (!(r * r <= longint'(v) && (r + 1) * (r + 1) > longint'(v))) begin
        failures++;
        if (failures < 10) $display("FAIL sqrt(%0d) got %0d", v, root);
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
