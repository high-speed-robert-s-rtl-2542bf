// rcd_top: Roberts cross edge detector with residue-number-system arithmetic.
//
// A grey-scale image streams in raster order, one 8-bit pixel per clock
// while in_valid is high, in_sof on the first pixel of each frame.  The
// pipeline is
//   forward conversion (binary -> residues mod {2^n-1, 2^n, 2^n+1}, n = N_GF)
//   -> 3 x 3 line-buffer window -> Gaussian filter in RNS
//   -> reverse conversion, divide by the kernel sum (shift by KSHIFT),
//      forward conversion into the n = N_RCO moduli set
//   -> 2 x 2 line-buffer window -> Roberts cross Gx^2 + Gy^2 in RNS
//   -> reverse conversion -> integer square root -> clamp to 255.
// The output is the gradient magnitude min(255, floor(sqrt(Gx^2 + Gy^2)))
// of the smoothed image, an (IMG_W-3) x (IMG_H-3) image (borders that the
// two windows cannot cover are dropped), one pixel per clock in raster
// order; out_sof marks its first pixel.  Fixed latency of 9 clocks from
// the input pixel that completes a window to the output pixel; in_valid may
// drop for any number of clocks (the pipeline does not stall, gaps pass
// through).
// From the source design: the Gaussian-then-Roberts-cross structure, RNS
// arithmetic in both functional blocks with the moduli set {2^n-1, 2^n,
// 2^n+1}, n = 4 or 6, 8-bit pixels and 256 x 256 images.  This design's
// choices: n = 6 in both stages by default (the range n = 4 gives is too
// small for either sum), the binomial Gaussian kernel, the line-buffered
// streaming interface, valid-only borders and the square-root magnitude.
module rcd_top
  import rns_pkg::*;
#(
  parameter int unsigned IMG_W  = 256,  // pixels per row of the input image
  parameter int unsigned N_GF   = 6,    // moduli set n of the Gaussian filter
  parameter int unsigned N_RCO  = 6,    // moduli set n of the Roberts cross
  parameter int unsigned KERNEL [9] = '{1, 2, 1, 2, 4, 2, 1, 2, 1},
  parameter int unsigned KSHIFT = 4     // log2 of the kernel sum
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_sof,
  input  logic [7:0] in_pixel,
  output logic       out_valid,
  output logic       out_sof,
  output logic [7:0] out_pixel
);

  localparam int unsigned GW = 3 * N_GF + 1;
  localparam int unsigned RW = 3 * N_RCO + 1;
  localparam int unsigned SQW = 2 * ((3 * N_RCO + 1) / 2);   // even width for isqrt

  // Stage 1: forward conversion of the input pixel.
  logic [N_GF-1:0] f1_lo, f1_mid;
  logic [N_GF:0]   f1_hi;
  logic            v1, s1;
  logic [GW-1:0]   p1;

  rns_fwd_conv #(.N(N_GF), .W(8)) u_fwd_in (
    .x(in_pixel), .r_lo(f1_lo), .r_mid(f1_mid), .r_hi(f1_hi));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      s1 <= 1'b0;
    end else begin
      v1 <= in_valid;
      s1 <= in_valid & in_sof;
    end
  end
  always_ff @(posedge clk) p1 <= {f1_hi, f1_mid, f1_lo};

  // Stage 2: 3 x 3 window of residues.
  logic          v2, s2;
  logic [GW-1:0] w3 [3][3];

  window_gen #(.W(GW), .COLS(IMG_W), .K(3)) u_win3 (
    .clk, .rst_n, .in_valid(v1), .in_sof(s1), .in_data(p1),
    .out_valid(v2), .out_sof(s2), .out_win(w3));

  // Stages 3-4: Gaussian filter in RNS.
  logic          v4, s4;
  logic [GW-1:0] g4;

  gauss_rns #(.N(N_GF), .KERNEL(KERNEL)) u_gauss (
    .clk, .rst_n, .in_valid(v2), .in_sof(s2), .win(w3),
    .out_valid(v4), .out_sof(s4), .out_res(g4));

  // Stage 5: back to binary, normalise, into the Roberts cross moduli set.
  logic [3*N_GF-1:0] g_bin;
  logic [7:0]        g_pix;
  logic [N_RCO-1:0]  f5_lo, f5_mid;
  logic [N_RCO:0]    f5_hi;
  logic              v5, s5;
  logic [RW-1:0]     p5;

  rns_rev_conv #(.N(N_GF)) u_rev_gf (
    .r_lo(g4[N_GF-1:0]), .r_mid(g4[2*N_GF-1:N_GF]), .r_hi(g4[3*N_GF:2*N_GF]), .x(g_bin));

  always_comb begin
    logic [3*N_GF-1:0] q;
    q     = g_bin >> KSHIFT;
    g_pix = (q > (3*N_GF)'(255)) ? 8'hFF : q[7:0];
  end

  rns_fwd_conv #(.N(N_RCO), .W(8)) u_fwd_rco (
    .x(g_pix), .r_lo(f5_lo), .r_mid(f5_mid), .r_hi(f5_hi));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v5 <= 1'b0;
      s5 <= 1'b0;
    end else begin
      v5 <= v4;
      s5 <= s4;
    end
  end
  always_ff @(posedge clk) p5 <= {f5_hi, f5_mid, f5_lo};

  // Stage 6: 2 x 2 window over the smoothed image (IMG_W-2 wide).
  logic          v6, s6;
  logic [RW-1:0] w2 [2][2];

  window_gen #(.W(RW), .COLS(IMG_W - 2), .K(2)) u_win2 (
    .clk, .rst_n, .in_valid(v5), .in_sof(s5), .in_data(p5),
    .out_valid(v6), .out_sof(s6), .out_win(w2));

  // Stages 7-8: Roberts cross operator in RNS.
  logic          v8, s8;
  logic [RW-1:0] r8;

  rco_rns #(.N(N_RCO)) u_rco (
    .clk, .rst_n, .in_valid(v6), .in_sof(s6), .win(w2),
    .out_valid(v8), .out_sof(s8), .out_res(r8));

  // Stage 9: back to binary, magnitude, clamp.
  logic [3*N_RCO-1:0] g2;
  logic [SQW/2-1:0]   mag;

  rns_rev_conv #(.N(N_RCO)) u_rev_rco (
    .r_lo(r8[N_RCO-1:0]), .r_mid(r8[2*N_RCO-1:N_RCO]), .r_hi(r8[3*N_RCO:2*N_RCO]), .x(g2));

  isqrt #(.W(SQW)) u_sqrt (.x(SQW'(g2)), .root(mag));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_pixel <= '0;
    end else begin
      out_valid <= v8;
      out_sof   <= s8;
      if (v8) out_pixel <= (mag > (SQW/2)'(255)) ? 8'hFF : mag[7:0];
    end
  end

endmodule
