// hrsd_adder: N-digit carry-free adder for high-radix signed-digit numbers.
//
// Numbers are vectors of N digits of radix r = 2^K with the maximally
// redundant digit set [-(r-1), r-1]; each digit is a (K+1)-bit two's
// complement number and the value is sum(d_i * r^i). The N digit slices work
// in parallel; each passes only a transfer digit in {-1, 0, +1} to its
// neighbour and absorbs the one it receives, so the delay is that of two
// (K+1)/(K+2)-bit adders plus a few gates, independent of N.
// The least significant position receives t_0 = 0. The transfer out of the
// most significant position, t_N, is the overflow digit: the true sum is
// S + t_N * r^N, and overflow is set when t_N is nonzero.
//
// Interface: a, b in (digit i in bits [i]); s, t_n, overflow out.
// Purely combinational, no clock or reset.
// Digit widths, the transfer rule and the slice structure follow the
// document; the default K and N are this design's choice.
module hrsd_adder
  import hrsd_pkg::*;
#(
  parameter int unsigned K = 4,    // radix r = 2^K
  parameter int unsigned N = 16    // digits per operand
) (
  input  logic [N-1:0][K:0] a,
  input  logic [N-1:0][K:0] b,
  output logic [N-1:0][K:0] s,
  output logic [1:0]        t_n,       // t_N, 2-bit two's complement
  output logic              overflow   // t_N != 0
);

  transfer_t t [N+1];

  assign t[0] = T_ZERO;

  for (genvar i = 0; i < N; i++) begin : g_digit
    hrsd_digit_slice #(.K(K)) u_slice (
      .a     (a[i]),
      .b     (b[i]),
      .t_in  (t[i]),
      .s     (s[i]),
      .t_out (t[i+1])
    );
  end

  assign t_n      = t[N];
  assign overflow = (t[N] != T_ZERO);

endmodule
