// tb_rco_rns: self-check of the RNS Roberts cross operator (n = 6).
// Random 2 x 2 windows of 8-bit pixels, as residues, with random idle
// clocks.  Each result must equal the residues of
// G2 = (P00 - P11)^2 + (P01 - P10)^2 from integer arithmetic and appear two
// clocks after its window.  Windows with negative differences and the
// largest G2 (2 * 255^2 = 130050) are forced and counted.
module tb_rco_rns;
  import rns_pkg::*;

  int checks = 0, failures = 0, cycle = 0, gaps = 0, negs = 0, maxg2 = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_sof = 0;
  int   pix [4];
  logic [18:0] win [2][2];
  logic        ov, os;
  logic [18:0] res;

  rco_rns #(.N(6)) dut (.clk, .rst_n, .in_valid, .in_sof, .win,
                        .out_valid(ov), .out_sof(os), .out_res(res));

  typedef struct { int g2; int sof; int stamp; } exp_t;
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
    if (ov && rst_n) begin
      exp_t e;
      chk("result present", int'(q.size() > 0), 1);
      if (q.size() > 0) begin
        e = q.pop_front();
        chk("latency", cycle - e.stamp, 2);
        chk("sof", int'(os), e.sof);
        chk("lo",  int'(res[5:0]),   e.g2 % 63);
        chk("mid", int'(res[11:6]),  e.g2 % 64);
        chk("hi",  int'(res[18:12]), e.g2 % 65);
      end
    end
    if (in_valid) begin
      exp_t e;
      int gx, gy;
      gx = pix[0] - pix[3];
      gy = pix[1] - pix[2];
      if (gx < 0 || gy < 0) negs++;
      e.g2 = gx * gx + gy * gy;
      if (e.g2 > maxg2) maxg2 = e.g2;
      e.sof = int'(in_sof);
      e.stamp = cycle;
      q.push_back(e);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(posedge clk); #1;
      in_valid = ($urandom_range(4) != 0);
      if (!in_valid) gaps++;
      in_sof = (t % 100 == 0);
      for (int i = 0; i < 4; i++) begin
        case (t % 8)
          0:       pix[i] = (i == 0 || i == 2) ? 255 : 0;   // largest G2
          1:       pix[i] = (i == 0 || i == 2) ? 0 : 255;   // both negative
          default: pix[i] = int'($urandom_range(255));
        endcase
        win[i/2][i%2] = {7'(pix[i] % 65), 6'(pix[i] % 64), 6'(pix[i] % 63)};
      end
    end
    @(posedge clk); #1 in_valid = 0;
    repeat (4) @(posedge clk);
    chk("all results out", q.size(), 0);
    chk("idle clocks seen", int'(gaps > 0), 1);
    chk("negative differences seen", int'(negs > 0), 1);
    chk("largest G2 seen", maxg2, 130050);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
