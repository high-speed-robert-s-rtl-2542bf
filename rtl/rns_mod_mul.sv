// rns_mod_mul: modulo multiplier for one RNS channel.
//
// Computes p = (a * b) mod m for m = 2^n-1, 2^n or 2^n+1 (KIND).  Inputs must
// be reduced (a, b < m).  The 2n-bit product is split into a high half H and
// a low half L, product = H * 2^n + L, and folded with the identity that
// the modulus gives for 2^n:
//   2^n-1 : 2^n = 1  (mod m), so p = L + H with end-around carry;
//   2^n   : p = L;
//   2^n+1 : 2^n = -1 (mod m), so p = L - H, plus m if negative.
// The source design replaces its binary multipliers with modulo multipliers
// of this moduli set; the folding circuits are this design's choice.
// Purely combinational.
module rns_mod_mul
  import rns_pkg::*;
#(
  parameter int unsigned N    = 6,
  parameter chan_kind_e  KIND = CH_LO,
  localparam int unsigned RW  = res_width(N, KIND)
) (
  input  logic [RW-1:0] a,
  input  logic [RW-1:0] b,
  output logic [RW-1:0] p
);

  localparam int unsigned PW = 2 * RW;

  logic [PW-1:0] prod;
  logic [PW-1:0] hi;
  logic [N:0]    fold;    // L + H for 2^n-1
  logic [N-1:0]  eac;
  logic [PW:0]   diff;    // L - H for 2^n+1, sign in the top bit

  always_comb begin
    prod = PW'(a) * PW'(b);
    hi   = prod >> N;
    fold = '0;
    eac  = '0;
    diff = '0;
    p    = '0;
    case (KIND)
      CH_LO: begin
        fold = {1'b0, prod[N-1:0]} + (N+1)'(hi);
        eac  = fold[N-1:0] + N'(fold[N]);
        p    = RW'((eac == {N{1'b1}}) ? '0 : eac);
      end
      CH_MID: begin
        p = RW'(prod[N-1:0]);
      end
      default: begin
        diff = (PW+1)'(prod[N-1:0]) - (PW+1)'(hi);
        if (diff[PW]) diff = diff + (PW+1)'(modulus(N, KIND));
        p = diff[RW-1:0];
      end
    endcase
  end

endmodule
