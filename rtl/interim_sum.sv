// interim_sum: step 3 of carry-free addition, w_i = p_i - r * t_{i+1}, for a
// two's complement position sum and the CHRA transfer.
//
// Subtracting r*t_{i+1} (r = 2^K) only changes bits K and above, so the K low
// bits of w_i are the K low bits of p_i unchanged (x_i and w^(K-1) = v_i).
// The sign bit of the (K+1)-bit result is a 3-input function of
// sign(p_i), u_i and v_i:
//   w^K = sign & ~u | sign & v | ~u & v
// No adder is involved, so the stage has constant delay. The transfer itself
// is not an input: the equation already folds in the CHRA choice of t_{i+1}.
// For p_i in [-(2r-2), 2r-2], w_i lies in [-(r-2), r-2].
//
// Interface: p in (K+2 bits), w out (K+1 bits). Purely combinational.
// The equation is the document's.
module interim_sum #(
  parameter int unsigned K = 4
) (
  input  logic [K+1:0] p,
  output logic [K:0]   w
);

  logic sgn, u, v;

  always_comb begin
    sgn = p[K+1];
    u   = p[K];
    v   = p[K-1];
    w   = {(sgn & ~u) | (sgn & v) | (~u & v), p[K-1:0]};
  end

endmodule
