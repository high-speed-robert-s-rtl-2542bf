// rns_fwd_conv: binary-to-residue (forward) converter for {2^n-1, 2^n, 2^n+1}.
//
// Turns a W-bit unsigned binary number into its three residues.  The number
// is cut into n-bit digits d0 (least significant), d1, d2, ...
//   mod 2^n   : the low digit d0, a plain bit selection;
//   mod 2^n-1 : d0 + d1 + d2 + ... , since 2^n = 1, folded with end-around
//               carry until n bits remain; all-ones maps to 0;
//   mod 2^n+1 : d0 - d1 + d2 - ... , since 2^n = -1, folded the same way
//               and finally brought into [0, 2^n] by one correction.
// The source design converts its 8-bit pixel intensities into this moduli
// set before filtering; the digit-folding circuit is this design's choice.
// Purely combinational, no carry chain wider than a few digits.
module rns_fwd_conv
  import rns_pkg::*;
#(
  parameter int unsigned N = 6,   // moduli set parameter n
  parameter int unsigned W = 8    // width of the binary input
) (
  input  logic [W-1:0] x,
  output logic [N-1:0] r_lo,      // x mod 2^n-1
  output logic [N-1:0] r_mid,     // x mod 2^n
  output logic [N:0]   r_hi       // x mod 2^n+1
);

  localparam int unsigned ND = (W + N - 1) / N;   // number of n-bit digits
  localparam int unsigned XW = ND * N;
  localparam int unsigned SW = N + $clog2(ND + 1) + 2;  // digit-sum width

  logic [XW-1:0]        xp;
  logic [SW-1:0]        sum_lo;
  logic signed [SW:0]   sum_hi;
  logic [N-1:0]         lo_f;

  localparam logic signed [SW:0] MHI = (SW+1)'(modulus(N, CH_HI));

  always_comb begin
    xp     = XW'(x);
    sum_lo = '0;
    sum_hi = '0;
    for (int d = 0; d < int'(ND); d++) begin
      sum_lo = sum_lo + SW'(xp[d*N +: N]);
      if (d % 2 == 0) sum_hi = sum_hi + (SW+1)'(xp[d*N +: N]);
      else            sum_hi = sum_hi - (SW+1)'(xp[d*N +: N]);
    end
    // End-around-carry folding for 2^n-1: each pass shrinks the sum.
    for (int i = 0; i < 3; i++)
      sum_lo = SW'(sum_lo[N-1:0]) + (sum_lo >> N);
    lo_f = sum_lo[N-1:0];
    r_lo = (lo_f == {N{1'b1}}) ? '0 : lo_f;
    // Alternating folding for 2^n+1: value = hi * 2^n + low = low - hi.
    for (int i = 0; i < 3; i++)
      sum_hi = $signed({1'b0, SW'(sum_hi[N-1:0])}) - (sum_hi >>> N);
    if (sum_hi < 0)    sum_hi = sum_hi + MHI;
    if (sum_hi >= MHI) sum_hi = sum_hi - MHI;
    r_hi  = sum_hi[N:0];
    r_mid = xp[N-1:0];
  end

endmodule
