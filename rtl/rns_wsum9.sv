// rns_wsum9: nine-tap constant-weight sum in one RNS channel.
//
// Computes y = sum_i WEIGHT[i] * x[i]  (mod m), m set by N and KIND.  Stage 1
// multiplies each tap by the residue of its weight with a modulo multiplier
// and registers the nine products; stage 2 adds them with a balanced tree of
// modulo adders (four, two, one, then the ninth tap) and registers the sum.
// Latency 2 clocks, one result per clock.  Used once per channel by the
// Gaussian filter; the structure (modulo multipliers feeding modulo adders)
// follows the source design, the tree shape and pipeline cut are this
// design's choice.
module rns_wsum9
  import rns_pkg::*;
#(
  parameter int unsigned N    = 6,
  parameter chan_kind_e  KIND = CH_LO,
  parameter int unsigned WEIGHT [9] = '{1, 2, 1, 2, 4, 2, 1, 2, 1},
  localparam int unsigned RW  = res_width(N, KIND)
) (
  input  logic          clk,
  input  logic [RW-1:0] x [9],
  output logic [RW-1:0] y
);

  logic [RW-1:0] prod   [9];
  logic [RW-1:0] prod_q [9];
  logic [RW-1:0] l1 [4];
  logic [RW-1:0] l2 [2];
  logic [RW-1:0] l3, l4;

  for (genvar i = 0; i < 9; i++) begin : g_mul
    rns_mod_mul #(.N(N), .KIND(KIND)) u_mul (
      .a(x[i]), .b(RW'(const_residue(longint'(WEIGHT[i]), N, KIND))), .p(prod[i]));
  end

  for (genvar i = 0; i < 4; i++) begin : g_l1
    rns_mod_add #(.N(N), .KIND(KIND)) u_add (
      .a(prod_q[2*i]), .b(prod_q[2*i+1]), .sub(1'b0), .s(l1[i]));
  end
  for (genvar i = 0; i < 2; i++) begin : g_l2
    rns_mod_add #(.N(N), .KIND(KIND)) u_add (
      .a(l1[2*i]), .b(l1[2*i+1]), .sub(1'b0), .s(l2[i]));
  end
  rns_mod_add #(.N(N), .KIND(KIND)) u_l3 (.a(l2[0]), .b(l2[1]),     .sub(1'b0), .s(l3));
  rns_mod_add #(.N(N), .KIND(KIND)) u_l4 (.a(l3),    .b(prod_q[8]), .sub(1'b0), .s(l4));

  always_ff @(posedge clk) begin
    prod_q <= prod;
    y      <= l4;
  end

endmodule
