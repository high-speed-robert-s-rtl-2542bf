// tb_gauss_rns: self-check of the RNS Gaussian filter.
// Two filters, n = 6 and n = 4, get the same random 3 x 3 windows of 8-bit
// pixels (as residues), with random idle clocks and a frame-start flag.
// Each result must equal the residues of S = sum K[i][j] * P[i][j] computed
// with integer arithmetic, and must appear two clocks after its window
// (latency checked per result).  The all-255 window (largest sum, 4080) is
// forced regularly; for n = 4 its residues are those of 4080 = M, i.e. 0.
module tb_gauss_rns;
  import rns_pkg::*;

  int checks = 0, failures = 0, cycle = 0, gaps = 0, maxsum = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int KER [9] = '{1, 2, 1, 2, 4, 2, 1, 2, 1};

  logic in_valid = 0, in_sof = 0;
  int   pix [9];
  logic [18:0] win6 [3][3];
  logic [12:0] win4 [3][3];
  logic        ov6, os6, ov4, os4;
  logic [18:0] res6;
  logic [12:0] res4;

  gauss_rns #(.N(6)) dut6 (.clk, .rst_n, .in_valid, .in_sof, .win(win6),
                           .out_valid(ov6), .out_sof(os6), .out_res(res6));
  gauss_rns #(.N(4)) dut4 (.clk, .rst_n, .in_valid, .in_sof, .win(win4),
                           .out_valid(ov4), .out_sof(os4), .out_res(res4));

  typedef struct { int s; int sof; int stamp; } exp_t;
  exp_t q [$];

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (ov6 && rst_n) begin
      exp_t e;
      chk("result present", int'(q.size() > 0), 1);
      if (q.size() > 0) begin
        e = q.pop_front();
        chk("latency", cycle - e.stamp, 2);
        chk("sof", int'(os6), e.sof);
        chk("n6 lo",  int'(res6[5:0]),   e.s % 63);
        chk("n6 mid", int'(res6[11:6]),  e.s % 64);
        chk("n6 hi",  int'(res6[18:12]), e.s % 65);
        chk("n4 valid", int'(ov4), 1);
        chk("n4 lo",  int'(res4[3:0]),   e.s % 15);
        chk("n4 mid", int'(res4[7:4]),   e.s % 16);
        chk("n4 hi",  int'(res4[12:8]),  e.s % 17);
      end
    end
    if (in_valid) begin
      exp_t e;
      e.s = 0;
      for (int i = 0; i < 9; i++) e.s += KER[i] * pix[i];
      e.sof = int'(in_sof);
      e.stamp = cycle;
      if (e.s > maxsum) maxsum = e.s;
      q.push_back(e);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(posedge clk); #1;
      in_valid = ($urandom_range(4) != 0);
      if (!in_valid) gaps++;
      in_sof = (t % 100 == 0);
      for (int i = 0; i < 9; i++) begin
        pix[i] = (t % 10 == 0) ? 255 : int'($urandom_range(255));
        win6[i/3][i%3] = {7'(pix[i] % 65), 6'(pix[i] % 64), 6'(pix[i] % 63)};
        win4[i/3][i%3] = {5'(pix[i] % 17), 4'(pix[i] % 16), 4'(pix[i] % 15)};
      end
    end
    @(posedge clk); #1 in_valid = 0;
    repeat (4) @(posedge clk);
    chk("all results out", q.size(), 0);
    chk("idle clocks seen", int'(gaps > 0), 1);
    chk("largest sum 4080 seen", maxsum, 4080);
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
