// tb_window_gen: self-check of the line-buffer window generator.
// A 3 x 3 and a 2 x 2 window generator (7 columns) see the same stream: two
// frames of 6 rows of random pixels, with random idle clocks between pixels.
// One clock after each accepted pixel, out_valid must be high exactly when
// the window fits in the image, out_sof exactly on the first such window of
// a frame, and every window element must equal the stored image pixel.
// The number of output windows per frame is checked, and so is that idle
// clocks and the frame restart actually occurred.
module tb_window_gen;
  localparam int COLS = 7, ROWS = 6, W = 8;

  int checks = 0, failures = 0;
  int gaps = 0, frames = 0, nwin3 = 0, nwin2 = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  logic [W-1:0] in_data = '0;
  logic v3, s3, v2, s2;
  logic [W-1:0] w3 [3][3];
  logic [W-1:0] w2 [2][2];

  window_gen #(.W(W), .COLS(COLS), .K(3)) dut3 (
    .clk, .rst_n, .in_valid, .in_sof, .in_data, .out_valid(v3), .out_sof(s3), .out_win(w3));
  window_gen #(.W(W), .COLS(COLS), .K(2)) dut2 (
    .clk, .rst_n, .in_valid, .in_sof, .in_data, .out_valid(v2), .out_sof(s2), .out_win(w2));

  always #5 clk = ~clk;

  logic [W-1:0] img [ROWS][COLS];
  int cur_r, cur_c;              // position of the pixel being driven
  logic pend = 0;                // a pixel was accepted at the previous edge
  int pr, pc;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    if (pend) begin
      chk("v3", int'(v3), int'(pr >= 2 && pc >= 2));
      chk("s3", int'(s3), int'(pr == 2 && pc == 2));
      chk("v2", int'(v2), int'(pr >= 1 && pc >= 1));
      chk("s2", int'(s2), int'(pr == 1 && pc == 1));
      if (v3) begin
        nwin3++;
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++)
            chk($sformatf("w3[%0d][%0d] at %0d,%0d", i, j, pr, pc),
                int'(w3[i][j]), int'(img[pr-2+i][pc-2+j]));
      end
      if (v2) begin
        nwin2++;
        for (int i = 0; i < 2; i++)
          for (int j = 0; j < 2; j++)
            chk($sformatf("w2[%0d][%0d] at %0d,%0d", i, j, pr, pc),
                int'(w2[i][j]), int'(img[pr-1+i][pc-1+j]));
      end
    end else if (rst_n) begin
      chk("v3 idle", int'(v3), 0);
      chk("v2 idle", int'(v2), 0);
    end
    pend <= in_valid;
    pr   <= cur_r;
    pc   <= cur_c;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      automatic int n3 = nwin3;
      automatic int n2 = nwin2;
      frames++;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          while ($urandom_range(3) == 0) begin
            @(posedge clk); #1 in_valid = 0;
            gaps++;
          end
          @(posedge clk); #1;
          img[r][c] = W'($urandom);
          in_valid = 1; in_sof = (r == 0 && c == 0); in_data = img[r][c];
          cur_r = r; cur_c = c;
        end
      @(posedge clk); #1 in_valid = 0;
      repeat (3) @(posedge clk);
      chk("windows 3x3 per frame", nwin3 - n3, (ROWS - 2) * (COLS - 2));
      chk("windows 2x2 per frame", nwin2 - n2, (ROWS - 1) * (COLS - 1));
    end
    chk("idle clocks seen", int'(gaps > 0), 1);
    chk("frame restart seen", int'(frames == 2), 1);
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
