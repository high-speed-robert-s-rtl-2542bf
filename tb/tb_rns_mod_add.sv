// tb_rns_mod_add: exhaustive self-check of the modulo adder/subtractor.
// For n = 4 and n = 6 and each modulus 2^n-1, 2^n, 2^n+1, every pair of
// reduced operands is added and subtracted and compared with (a +/- b) mod m
// computed with integer arithmetic.  A time-out watchdog ends a hung run.
module tb_rns_mod_add;
  import rns_pkg::*;

  int checks = 0, failures = 0, done = 0;
  localparam int unsigned NS [2] = '{4, 6};

  for (genvar gn = 0; gn < 2; gn++) begin : g_n
    for (genvar gk = 0; gk < 3; gk++) begin : g_k
      localparam int unsigned N = NS[gn];
      localparam chan_kind_e KIND = chan_kind_e'(gk);
      localparam int unsigned RW = res_width(N, KIND);
      localparam int M = int'(modulus(N, KIND));
      logic [RW-1:0] a, b, s;
      logic sub;
      rns_mod_add #(.N(N), .KIND(KIND)) dut (.a, .b, .sub, .s);
      initial begin
        int exp;
        for (int op = 0; op < 2; op++)
          for (int i = 0; i < M; i++)
            for (int j = 0; j < M; j++) begin
              a = RW'(i); b = RW'(j); sub = op[0];
              #1;
              exp = (op != 0) ? ((i - j + M) % M) : ((i + j) % M);
              checks++;
              if (int'(s) != exp) begin
                failures++;
                if (failures < 10)
                  $display("FAIL n=%0d m=%0d op=%0d a=%0d b=%0d got %0d exp %0d",
                           N, M, op, i, j, s, exp);
              end
            end
        done++;
      end
    end
  end

  initial begin
    wait (done == 6);
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
