// rns_rev_conv: residue-to-binary (reverse) converter for {2^n-1, 2^n, 2^n+1}.
//
// Rebuilds X in [0, M), M = 2^3n - 2^n, from its residues by mixed-radix
// conversion.  Write X = x_mid + 2^n * Z with 0 <= Z < 2^2n - 1.  Because
// 2^n = 1 (mod 2^n-1) and 2^n = -1 (mod 2^n+1):
//   Z1 = Z mod 2^n-1 = (x_lo  - x_mid) mod 2^n-1
//   Z3 = Z mod 2^n+1 = (x_mid - x_hi ) mod 2^n+1
// and Z = Z3 + (2^n+1) * T with T = (Z1 - Z3) * 2^(n-1) mod 2^n-1, where
// 2^(n-1) is the inverse of 2^n+1 = 2 modulo 2^n-1.  Multiplying by 2^(n-1)
// modulo 2^n-1 is a one-bit right rotation, and multiplying by 2^n+1 is a
// shift plus an add, so the converter needs three modulo subtractors and two
// adders and no multiplier or lookup table.
// The source design names mixed-radix conversion and the Chinese remainder
// theorem as its reverse-conversion methods without giving a circuit; this
// one is this design's choice.  Purely combinational.
module rns_rev_conv
  import rns_pkg::*;
#(
  parameter int unsigned N = 6,
  localparam int unsigned XW = 3 * N
) (
  input  logic [N-1:0]  r_lo,     // X mod 2^n-1
  input  logic [N-1:0]  r_mid,    // X mod 2^n
  input  logic [N:0]    r_hi,     // X mod 2^n+1
  output logic [XW-1:0] x         // X
);

  logic [N-1:0] mid_lo;    // x_mid reduced modulo 2^n-1
  logic [N-1:0] z1;
  logic [N:0]   z3;
  logic [N-1:0] z3_lo;     // Z3 reduced modulo 2^n-1
  logic [N-1:0] d;
  logic [N-1:0] t;
  logic [2*N-1:0] z;

  always_comb begin
    mid_lo = (r_mid == {N{1'b1}}) ? '0 : r_mid;
    if (z3 == (N+1)'(1) << N)                 z3_lo = N'(1);
    else if (z3[N-1:0] == {N{1'b1}})         z3_lo = '0;
    else                                     z3_lo = z3[N-1:0];
  end

  rns_mod_add #(.N(N), .KIND(CH_LO)) u_z1 (.a(r_lo), .b(mid_lo), .sub(1'b1), .s(z1));
  rns_mod_add #(.N(N), .KIND(CH_HI)) u_z3 (.a({1'b0, r_mid}), .b(r_hi), .sub(1'b1), .s(z3));
  rns_mod_add #(.N(N), .KIND(CH_LO)) u_d  (.a(z1), .b(z3_lo), .sub(1'b1), .s(d));

  always_comb begin
    t = {d[0], d[N-1:1]};                                // times 2^(n-1) mod 2^n-1
    z = (2*N)'(z3) + ((2*N)'(t) << N) + (2*N)'(t);       // Z3 + (2^n+1) * T
    x = {z, r_mid};
  end

endmodule
