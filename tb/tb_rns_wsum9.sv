// tb_rns_wsum9: self-check of the nine-tap RNS weighted sum.
// Four instances: the three channels of n = 6 with the binomial Gaussian
// kernel, and the 2^4-1 channel with weights 0..7 and 20 (a weight larger
// than the modulus).  Random reduced residues enter every clock; two clocks
// later each output must equal (read one clock after it updates) sum(w[i] * x[i]) mod m from integer
// arithmetic, which also checks the two-clock latency.
module tb_rns_wsum9;
  import rns_pkg::*;

  int checks = 0, failures = 0, done = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int unsigned NS [4] = '{6, 6, 6, 4};
  localparam int unsigned KS [4] = '{0, 1, 2, 0};
  localparam int unsigned WG [9] = '{1, 2, 1, 2, 4, 2, 1, 2, 1};
  localparam int unsigned WX [9] = '{0, 1, 2, 3, 4, 5, 6, 7, 20};

  for (genvar g = 0; g < 4; g++) begin : g_i
    localparam int unsigned N = NS[g];
    localparam chan_kind_e KIND = chan_kind_e'(KS[g]);
    localparam int unsigned RW = res_width(N, KIND);
    localparam int M = int'(modulus(N, KIND));
    localparam int unsigned WT [9] = (g == 3) ? WX : WG;
    logic [RW-1:0] x [9];
    logic [RW-1:0] y;
    int exp_q [$];

    rns_wsum9 #(.N(N), .KIND(KIND), .WEIGHT(WT)) dut (.clk, .x, .y);

    initial begin
      for (int i = 0; i < 9; i++) x[i] = '0;
      for (int t = 0; t < 3000; t++) begin
        int e, v;
        @(posedge clk);
        if (exp_q.size() == 3) begin
          e = exp_q.pop_front();
          checks++;
          if (int'(y) != e) begin
            failures++;
            if (failures < 10) $display("FAIL inst %0d t=%0d got %0d exp %0d", g, t, y, e);
          end
        end
        #1;
        e = 0;
        for (int i = 0; i < 9; i++) begin
          // every third vector uses the largest residue m-1 on all taps
          v = (t % 3 == 0) ? M - 1 : int'($urandom_range(M - 1));
          x[i] = RW'(v);
          e = (e + int'(WT[i]) * v) % M;
        end
        exp_q.push_back(e);
      end
      done++;
    end
  end

  initial begin
    wait (done == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
