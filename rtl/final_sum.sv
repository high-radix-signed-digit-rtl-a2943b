// final_sum: step 4 of carry-free addition, s_i = w_i + t_i.
//
// The incoming transfer t_i in {-1, 0, +1} (2-bit two's complement) is
// sign-extended to K+1 bits and added to the interim sum: a two's complement
// increment/decrement. Because |w_i| <= r-2, the result lies in
// [-(r-1), r-1] = [-alpha, alpha] and no new transfer is produced.
// This is the one K-dependent cell after the position sum.
//
// Interface: w, t_in in; s out. Purely combinational.
// The document gives the operation; the plain adder is this design's choice.
module final_sum
  import hrsd_pkg::*;
#(
  parameter int unsigned K = 4
) (
  input  logic [K:0] w,
  input  transfer_t  t_in,
  output logic [K:0] s
);

  logic [1:0] t_bits;

  always_comb begin
    t_bits = t_in;
    s = w + {{(K-1){t_bits[1]}}, t_bits};
  end

endmodule
