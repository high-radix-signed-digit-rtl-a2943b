// hrsd_digit_slice: one digit position of the carry-free HRSD adder.
//
// Chains the four steps of carry-free addition for digit i:
//   p_i     = a_i + b_i                      (position_sum)
//   t_{i+1} = CHRA(sign, u, v of p_i)        (chra_transfer)
//   w_i     = p_i - r * t_{i+1}              (interim_sum)
//   s_i     = w_i + t_i                      (final_sum)
// t_{i+1} leaves the slice towards position i+1, t_i comes in from position
// i-1. t_i only feeds the last adder, so no carry ever crosses more than one
// digit boundary: the adder's delay does not grow with the number of digits.
// Digits are (K+1)-bit two's complement numbers in [-(2^K-1), 2^K-1]
// (radix r = 2^K, maximally redundant digit set alpha = r-1).
//
// Interface: a, b, t_in in; s, t_out out. Purely combinational.
// The four steps and their order follow the document; grouping them into one
// slice module, and using one adder per step (the least-cost organisation),
// is this design's choice.
module hrsd_digit_slice
  import hrsd_pkg::*;
#(
  parameter int unsigned K = 4
) (
  input  logic [K:0] a,
  input  logic [K:0] b,
  input  transfer_t  t_in,    // t_i, from the next lower position
  output logic [K:0] s,
  output transfer_t  t_out    // t_{i+1}, to the next higher position
);

  logic [K+1:0] p;
  logic [K:0]   w;

  position_sum #(.K(K)) u_psum (
    .a (a),
    .b (b),
    .p (p)
  );

  chra_transfer u_xfer (
    .p_top (p[K+1:K-1]),
    .t     (t_out)
  );

  interim_sum #(.K(K)) u_wsum (
    .p (p),
    .w (w)
  );

  final_sum #(.K(K)) u_ssum (
    .w    (w),
    .t_in (t_in),
    .s    (s)
  );

endmodule
