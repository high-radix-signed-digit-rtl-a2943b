// chra_transfer: step 2 of carry-free addition with the Compare with Half
// Radix Algorithm (CHRA).
//
// Instead of comparing |p_i| with alpha, the transfer is chosen by comparing
// |p_i| with r/2 = 2^(K-1). For a two's complement position sum this needs
// only its three most significant bits: sign(p_i), u_i (bit K) and v_i
// (bit K-1). The transfer is +1 when p_i >= r/2, -1 when p_i < -r/2, and 0
// otherwise; at p_i = -r/2 exactly the rule picks 0, which the theorem behind
// CHRA allows and which keeps the logic to two small terms:
//   t^1 = sign & ~(u & v)
//   t^0 = (~sign | ~u | ~v) & (sign | u | v)   (the three bits not all equal)
// The logic does not depend on K, so its delay is constant.
//
// Interface: p_top = {sign, u, v} in, t (2-bit two's complement) out.
// Purely combinational. The equations are the document's.
module chra_transfer
  import hrsd_pkg::*;
(
  input  logic [2:0] p_top,
  output transfer_t  t
);

  logic sgn, u, v;
  logic t1, t0;

  always_comb begin
    {sgn, u, v} = p_top;
    t1 = sgn & ~(u & v);
    t0 = (~sgn | ~u | ~v) & (sgn | u | v);
    t  = transfer_t'({t1, t0});
  end

endmodule
