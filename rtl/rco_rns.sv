// rco_rns: Roberts cross operator computed in the RNS.
//
// Takes a 2 x 2 window of pixels in residue form, packed as
// {r_hi[n:0], r_mid[n-1:0], r_lo[n-1:0]}, with P00 top-left and P11
// bottom-right, and produces the residues of the squared gradient magnitude
//   G2 = Gx^2 + Gy^2,   Gx = P00 - P11,   Gy = P01 - P10.
// Stage 1 forms both diagonal differences with modulo subtractors and
// squares them with modulo multipliers; stage 2 adds the squares.  A
// negative difference is just its residue modulo M, and its square is the
// true square, so no sign detection is needed as long as M > 2 * 255^2 =
// 130050, which n = 6 (M = 262080) satisfies.
// Latency 2 clocks, one window per clock.  The Roberts cross kernels and
// the use of RNS modulo adders and multipliers follow the source design;
// squaring (rather than an absolute-value sum) is this design's choice.
module rco_rns
  import rns_pkg::*;
#(
  parameter int unsigned N = 6,
  localparam int unsigned PW = 3 * N + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  logic [PW-1:0] win [2][2],
  output logic          out_valid,
  output logic          out_sof,
  output logic [PW-1:0] out_res
);

  localparam chan_kind_e KINDS [3] = '{CH_LO, CH_MID, CH_HI};
  localparam int unsigned LSB  [3] = '{0, N, 2 * N};

  logic [1:0] v_q, s_q;

  for (genvar ch = 0; ch < 3; ch++) begin : g_ch
    localparam int unsigned RW = res_width(N, KINDS[ch]);
    logic [RW-1:0] p00, p01, p10, p11, gx, gy, gx2, gy2, gx2_q, gy2_q, s;

    assign p00 = win[0][0][LSB[ch] +: RW];
    assign p01 = win[0][1][LSB[ch] +: RW];
    assign p10 = win[1][0][LSB[ch] +: RW];
    assign p11 = win[1][1][LSB[ch] +: RW];

    rns_mod_add #(.N(N), .KIND(KINDS[ch])) u_gx (.a(p00), .b(p11), .sub(1'b1), .s(gx));
    rns_mod_add #(.N(N), .KIND(KINDS[ch])) u_gy (.a(p01), .b(p10), .sub(1'b1), .s(gy));
    rns_mod_mul #(.N(N), .KIND(KINDS[ch])) u_sx (.a(gx), .b(gx), .p(gx2));
    rns_mod_mul #(.N(N), .KIND(KINDS[ch])) u_sy (.a(gy), .b(gy), .p(gy2));
    rns_mod_add #(.N(N), .KIND(KINDS[ch])) u_s  (.a(gx2_q), .b(gy2_q), .sub(1'b0), .s(s));

    always_ff @(posedge clk) begin
      gx2_q <= gx2;
      gy2_q <= gy2;
      out_res[LSB[ch] +: RW] <= s;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
      s_q <= '0;
    end else begin
      v_q <= {v_q[0], in_valid};
      s_q <= {s_q[0], in_valid & in_sof};
    end
  end

  assign out_valid = v_q[1];
  assign out_sof   = s_q[1];

endmodule
