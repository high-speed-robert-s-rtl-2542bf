// isqrt: combinational integer square root, floor(sqrt(x)).
//
// Restoring digit-by-digit method: one result bit per step, from the most
// significant down, each step a trial subtraction of (4 * root + 1) shifted
// into place.  W must be even; the root has W/2 bits.  Turns the squared
// Roberts cross gradient Gx^2 + Gy^2 back into a magnitude.  The source
// design's output is the gradient magnitude; computing it through a square
// root of the RNS result is this design's choice.
module isqrt #(
  parameter int unsigned W = 18
) (
  input  logic [W-1:0]   x,
  output logic [W/2-1:0] root
);

  logic [W-1:0]   rem;
  logic [W+1:0]   trial;
  logic [W+1:0]   acc;       // remainder being built, two bits per step

  always_comb begin
    rem  = x;
    acc  = '0;
    root = '0;
    for (int i = int'(W / 2) - 1; i >= 0; i--) begin
      acc   = (acc << 2) | (W+2)'(rem[2*i +: 2]);
      trial = ((W+2)'(root) << 2) | (W+2)'(1);
      root  = root << 1;
      if (acc >= trial) begin
        acc  = acc - trial;
        root = root | (W/2)'(1);
      end
    end
  end

endmodule
