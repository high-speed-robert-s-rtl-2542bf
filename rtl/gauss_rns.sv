// gauss_rns: 3 x 3 Gaussian smoothing filter computed in the RNS.
//
// Takes a 3 x 3 window of pixels already in residue form, each packed as
// {r_hi[n:0], r_mid[n-1:0], r_lo[n-1:0]} (3n+1 bits), and produces the
// residues of the un-normalised weighted sum S = sum K[i][j] * P[i][j].  The
// three channels run side by side with no carries between them, each a
// nine-tap modulo multiply-add (rns_wsum9).  Division by the kernel sum is
// left to the binary side after reverse conversion, where it is a shift.
// The dynamic range M = 2^3n - 2^n must exceed 255 * sum(K); with the
// default kernel (sum 16, S <= 4080) that needs n = 6 (M = 262080); n = 4
// (M = 4080) wraps only for a window of nine 255s.
// Latency 2 clocks, one window per clock; out_valid/out_sof follow
// in_valid/in_sof.  Performing the Gaussian filter with RNS modulo
// multipliers and adders follows the source design; the kernel values are
// this design's choice (the common binomial 3 x 3 kernel).
module gauss_rns
  import rns_pkg::*;
#(
  parameter int unsigned N = 6,
  parameter int unsigned KERNEL [9] = '{1, 2, 1, 2, 4, 2, 1, 2, 1},  // row-major
  localparam int unsigned PW = 3 * N + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  logic [PW-1:0] win [3][3],
  output logic          out_valid,
  output logic          out_sof,
  output logic [PW-1:0] out_res
);

  logic [N-1:0] x_lo  [9];
  logic [N-1:0] x_mid [9];
  logic [N:0]   x_hi  [9];
  logic [N-1:0] y_lo, y_mid;
  logic [N:0]   y_hi;
  logic [1:0]   v_q, s_q;

  always_comb begin
    for (int i = 0; i < 9; i++) begin
      x_lo[i]  = win[i/3][i%3][N-1:0];
      x_mid[i] = win[i/3][i%3][2*N-1:N];
      x_hi[i]  = win[i/3][i%3][3*N:2*N];
    end
  end

  rns_wsum9 #(.N(N), .KIND(CH_LO),  .WEIGHT(KERNEL)) u_lo  (.clk, .x(x_lo),  .y(y_lo));
  rns_wsum9 #(.N(N), .KIND(CH_MID), .WEIGHT(KERNEL)) u_mid (.clk, .x(x_mid), .y(y_mid));
  rns_wsum9 #(.N(N), .KIND(CH_HI),  .WEIGHT(KERNEL)) u_hi  (.clk, .x(x_hi),  .y(y_hi));

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
  assign out_res   = {y_hi, y_mid, y_lo};

endmodule
