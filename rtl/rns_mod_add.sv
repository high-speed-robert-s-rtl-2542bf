// rns_mod_add: modulo adder/subtractor for one RNS channel.
//
// Computes s = (a + b) mod m when sub = 0 and s = (a - b) mod m when sub = 1,
// for m = 2^n-1, 2^n or 2^n+1 as chosen by KIND.  Inputs must already be
// reduced (a, b < m).  Each modulus uses its cheap form:
//   2^n-1 : n-bit add with end-around carry; subtraction adds ~b, the
//           one's complement, which is m - b.  The all-ones pattern (the
//           second encoding of zero) is mapped back to 0.
//   2^n   : n-bit add or subtract, carry dropped.
//   2^n+1 : (n+1)-bit add, then subtract m if the sum reached m; for
//           subtraction add m back if the difference went negative.
// The source design builds its filters from modulo adders of this moduli set;
// the particular circuits here are this design's choice.  Purely
// combinational: the filters around it place the pipeline registers.
module rns_mod_add
  import rns_pkg::*;
#(
  parameter int unsigned N    = 6,
  parameter chan_kind_e  KIND = CH_LO,
  localparam int unsigned RW  = res_width(N, KIND)
) (
  input  logic [RW-1:0] a,
  input  logic [RW-1:0] b,
  input  logic          sub,
  output logic [RW-1:0] s
);

  localparam logic [RW+1:0] M = (RW+2)'(modulus(N, KIND));

  logic [RW+1:0] t;       // wide intermediate sum or difference
  logic [N-1:0]  eac;     // end-around-carry result for 2^n-1

  always_comb begin
    t   = '0;
    eac = '0;
    s   = '0;
    case (KIND)
      CH_LO: begin
        t   = {2'b00, a} + {2'b00, (sub ? ~b : b)};
        eac = t[N-1:0] + N'(t[N]);
        s   = RW'((eac == {N{1'b1}}) ? '0 : eac);
      end
      CH_MID: begin
        s = sub ? RW'(a - b) : RW'(a + b);
      end
      default: begin
        if (sub) begin
          t = {2'b00, a} - {2'b00, b};
          if (t[RW+1]) t = t + M;        // negative: add the modulus back
        end else begin
          t = {2'b00, a} + {2'b00, b};
          if (t >= M) t = t - M;
        end
        s = t[RW-1:0];
      end
    endcase
  end

endmodule
