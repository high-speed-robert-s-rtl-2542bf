// tb_rcd_top: end-to-end self-check of the RNS Roberts cross edge detector
// at its default size (256-pixel rows, n = 6 in both stages).
// Two 256 x 256 frames are streamed, the first of random noise, the second a
// scene of flat regions, a bright disc, diagonal bars and a ramp, with random
// idle clocks between pixels.  A behavioural model in plain integer
// arithmetic (Gaussian sum, shift by 4, Roberts cross, floor of the square
// root, clamp to 255) predicts every output pixel.  Checked: each pixel
// value, raster order, out_sof on the first pixel of each frame, the
// 253 x 253 output size, the fixed nine-clock latency from the input pixel
// that completes a window to its output pixel, and one output per accepted
// input in steady state.  Counted and required: idle clocks, the frame
// restart, and windows whose diagonal differences are negative (which the
// RNS must carry as residues of negative numbers).
module tb_rcd_top;
  localparam int W = 256, H = 256, NF = 2;
  localparam int OW = W - 3, OH = H - 3;
  localparam int KER [9] = '{1, 2, 1, 2, 4, 2, 1, 2, 1};

  int checks = 0, failures = 0, cycle = 0;
  int gaps = 0, frames = 0, negs = 0, outs = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid = 0, in_sof = 0;
  logic [7:0] in_pixel = '0;
  logic       out_valid, out_sof;
  logic [7:0] out_pixel;

  rcd_top dut (.clk, .rst_n, .in_valid, .in_sof, .in_pixel,
               .out_valid, .out_sof, .out_pixel);

  typedef struct { int pix; int sof; int stamp; } exp_t;
  exp_t q [$];

  int img [H][W];
  int sm  [H][W];
  int stamp_of [H][W];   // clock at which each input pixel was accepted

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic int isqrt_ref(int v);
    int r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic int scene(int f, int r, int c);
    if (f == 0) return int'($urandom_range(255));
    if ((r - 128) * (r - 128) + (c - 100) * (c - 100) < 40 * 40) return 230;
    if (((r + c) / 16) % 2 == 0 && r > 180) return 20;
    if (c > 200) return r;                      // vertical ramp
    if (((r - c + 512) / 24) % 2 == 0 && r < 60) return 200;
    return 60;
  endfunction

  // Builds the expected output queue of a frame once its image is known.
  task automatic model_frame();
    for (int r = 0; r < H - 2; r++)
      for (int c = 0; c < W - 2; c++) begin
        int s = 0;
        for (int i = 0; i < 9; i++) s += KER[i] * img[r + i / 3][c + i % 3];
        sm[r][c] = s >> 4;
      end
    for (int r = 0; r < OH; r++)
      for (int c = 0; c < OW; c++) begin
        exp_t e;
        int gx, gy, m;
        gx = sm[r][c] - sm[r + 1][c + 1];
        gy = sm[r][c + 1] - sm[r + 1][c];
        if (gx < 0 || gy < 0) negs++;
        m = isqrt_ref(gx * gx + gy * gy);
        e.pix   = (m > 255) ? 255 : m;
        e.sof   = int'(r == 0 && c == 0);
        e.stamp = stamp_of[r + 3][c + 3];
        q.push_back(e);
      end
  endtask

  exp_t got_q [$];
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (out_valid && rst_n) begin
      exp_t g;
      g.pix = int'(out_pixel); g.sof = int'(out_sof); g.stamp = cycle;
      got_q.push_back(g);
      outs++;
    end
  end

  initial begin
    int f_base;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      frames++;
      f_base = got_q.size();
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          while ($urandom_range(7) == 0) begin
            @(posedge clk); #1 in_valid = 0;
            gaps++;
          end
          @(posedge clk); #1;
          img[r][c] = scene(f, r, c);
          in_valid = 1; in_sof = (r == 0 && c == 0); in_pixel = 8'(img[r][c]);
          stamp_of[r][c] = cycle;     // accepted at the next edge
        end
      @(posedge clk); #1 in_valid = 0;
      repeat (12) @(posedge clk);
      model_frame();
      chk("output pixels per frame", got_q.size() - f_base, OW * OH);
      while (q.size() > 0 && got_q.size() > f_base) begin
        exp_t e, g;
        e = q.pop_front();
        g = got_q[f_base];
        got_q.delete(f_base);
        chk("pixel", g.pix, e.pix);
        chk("sof", g.sof, e.sof);
        chk("latency", g.stamp - e.stamp, 9);
      end
      got_q.delete();
      q.delete();
    end
    chk("idle clocks seen", int'(gaps > 0), 1);
    chk("frame restart seen", int'(frames == NF), 1);
    chk("negative differences seen", int'(negs > 0), 1);
    $display("frames=%0d idle_clocks=%0d negative_windows=%0d outputs=%0d", frames, gaps, negs, outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
