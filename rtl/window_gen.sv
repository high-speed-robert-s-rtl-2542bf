// window_gen: sliding K x K window over a raster-scanned image stream.
//
// Pixels (any W-bit word, here a packed set of residues) arrive one per
// clock when in_valid is high, row by row, COLS pixels per row; in_sof marks
// the first pixel of a frame and restarts the row and column counters.
// K-1 line buffers hold the previous rows.  For every incoming pixel the
// column {K-1 rows above ... current} is shifted into a K x K register
// window.  One clock after a pixel enters, out_win holds the window whose
// bottom-right element is that pixel; out_valid is high only when the
// window lies completely inside the image (row >= K-1 and column >= K-1),
// so a COLS-wide input gives a (COLS-K+1)-wide output with no padding.
// out_win[0][0] is the top-left (oldest) pixel.
// The source design filters with a Gaussian kernel and the 2 x 2 Roberts
// cross kernel but does not describe how pixels are buffered; line buffers
// with a register window, valid-only borders and the sof restart are this
// design's choices.  in_valid may drop at any time: the window simply waits.
module window_gen #(
  parameter int unsigned W    = 19,   // bits per pixel word
  parameter int unsigned COLS = 256,  // pixels per input row
  parameter int unsigned K    = 3     // window size
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_sof,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic         out_sof,
  output logic [W-1:0] out_win [K][K]
);

  localparam int unsigned CW = $clog2(COLS);
  localparam int unsigned RW = $clog2(K) + 1;

  logic [W-1:0]  lb [K-1][COLS];   // lb[j] holds the row j+1 rows above
  logic [CW-1:0] col, c;
  logic [RW-1:0] row, r;           // saturates at K
  logic [W-1:0]  colv [K];         // new window column, top to bottom

  always_comb begin
    c = in_sof ? '0 : col;
    r = in_sof ? '0 : row;
    colv[K-1] = in_data;
    for (int j = 0; j < int'(K) - 1; j++)
      colv[K-2-j] = lb[j][c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      if (in_valid) begin
        out_valid <= (r >= RW'(K - 1)) && (c >= CW'(K - 1));
        out_sof   <= (r == RW'(K - 1)) && (c == CW'(K - 1));
        if (c == CW'(COLS - 1)) begin
          col <= '0;
          row <= (r < RW'(K)) ? r + 1'b1 : r;
        end else begin
          col <= c + 1'b1;
          row <= r;
        end
      end
    end
  end

  // Line buffers and window registers hold data only; they need no reset.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb[0][c] <= in_data;
      for (int j = 1; j < int'(K) - 1; j++)
        lb[j][c] <= lb[j-1][c];
      for (int i = 0; i < int'(K); i++) begin
        for (int k = 0; k < int'(K) - 1; k++)
          out_win[i][k] <= out_win[i][k+1];
        out_win[i][K-1] <= colv[i];
      end
    end
  end

endmodule
