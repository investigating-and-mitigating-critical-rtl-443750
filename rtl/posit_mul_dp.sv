// posit_mul_dp: combinational Posit(32,2) multiplier datapath whose two scale
// adders live outside the module.
//
// Decoding (DECO): two posit_decode units give sign, scale and 30-bit
// fraction 1.f of each operand. The fractions are multiplied exactly into 60
// bits; the product of two values in [1, 2) lies in [1, 4), so bit 59 says
// whether one normalization step is needed. Scale path, through the external
// adder slots:
//   slot 0 (+): sa + sb
//   slot 1 (+): (sa + sb) + p[59]   the normalization step enters as carry-in
// The normalized product goes out as a ps_enc_t with the leading one at
// bit 63 for posit_encode (ENCO), which rounds and saturates. A zero operand
// gives zero, NaR in either operand gives NaR.
// As in the document, the multiplier's regime and exponent handling (decoder
// CLZs and scale adders) is what the hardened wrapper protects; the split into
// two adder slots and the plain '*' for the fraction product are this
// design's own choices. HARDEN selects redundant multiplexers in the
// decoders' CLZs.
module posit_mul_dp
  import fpp_pkg::*;
#(
  parameter bit HARDEN = 1'b0
) (
  input  logic [PS_N-1:0]    a,
  input  logic [PS_N-1:0]    b,
  output logic [1:0][XW-1:0] add_a,
  output logic [1:0][XW-1:0] add_b,
  output logic [1:0]         add_cin,
  input  logic [1:0][XW-1:0] add_s,
  output ps_enc_t            enc
);
  logic          sga, sgb, za, zb, na, nb;
  logic [XW-1:0] sa, sb;
  logic [29:0]   fa, fb;
  logic [59:0]   p;

  posit_decode #(.HARDEN(HARDEN)) u_da (.p(a), .sign(sga), .zero(za), .nar(na), .scale(sa), .frac(fa));
  posit_decode #(.HARDEN(HARDEN)) u_db (.p(b), .sign(sgb), .zero(zb), .nar(nb), .scale(sb), .frac(fb));

  assign p = fa * fb;

  assign add_a[0] = sa;       assign add_b[0] = sb;  assign add_cin[0] = 1'b0;
  assign add_a[1] = add_s[0]; assign add_b[1] = '0;  assign add_cin[1] = p[59];

  always_comb begin
    enc.pass     = na || nb || za || zb;
    enc.pass_val = (na || nb) ? {1'b1, {(PS_N-1){1'b0}}} : '0;
    enc.zero     = 1'b0;
    enc.sign     = sga ^ sgb;
    enc.scale    = add_s[1];
    enc.mant     = p[59] ? {p, 4'd0} : {p[58:0], 5'd0};
  end
endmodule
