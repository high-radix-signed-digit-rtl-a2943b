// position_sum: step 1 of carry-free addition, p_i = a_i + b_i.
//
// Each signed digit is a (K+1)-bit two's complement number. Both digits are
// sign-extended by one bit and added, giving a (K+2)-bit two's complement
// position sum that cannot overflow. This is the only K-dependent (carry
// propagating) cell before the transfer is known. For digits in
// [-(2^K-1), 2^K-1] the sum lies in [-(2^(K+1)-2), 2^(K+1)-2].
//
// Interface: a, b in, p out. Purely combinational, no clock.
// Follows the document: one-bit sign extension and a (K+2)-bit adder.
module position_sum #(
  parameter int unsigned K = 4   // radix r = 2^K, K > 1
) (
  input  logic [K:0]   a,
  input  logic [K:0]   b,
  output logic [K+1:0] p
);

  always_comb p = {a[K], a} + {b[K], b};

endmodule
