// posit_add_dp: combinational Posit(32,2) adder datapath whose three scale
// adders live outside the module.
//
// Decoding (DECO): two posit_decode units give sign, scale and fraction of
// each operand. Scale path, through the external adder slots:
//   slot 0 (-): d = sa - sb           picks the larger operand and the shift
//   slot 1 (+): s_big + 1             scale of bit 63 of the raw sum
//   slot 2 (-): (s_big + 1) - z       scale after normalization
// Fraction path: the smaller fraction is shifted right by |d| (for d < 0 the
// shift is ~d plus one fixed position, so no negation adder is needed), the
// bits shifted out are OR-ed into the least significant bit, the fractions are
// added or subtracted in 64 bits, and the magnitude is normalized by a
// count-leading-zeros z and a left shift. The result goes out as a ps_enc_t
// for posit_encode (ENCO). A zero operand passes the other one through; NaR
// in either operand gives NaR.
// HARDEN selects redundant multiplexers in the decoders' CLZs.
module posit_add_dp
  import fpp_pkg::*;
#(
  parameter bit HARDEN = 1'b0
) (
  input  logic [PS_N-1:0]    a,
  input  logic [PS_N-1:0]    b,
  output logic [2:0][XW-1:0] add_a,
  output logic [2:0][XW-1:0] add_b,
  output logic [2:0]         add_cin,
  input  logic [2:0][XW-1:0] add_s,
  output ps_enc_t            enc
);
  logic          sga, sgb, za, zb, na, nb;
  logic [XW-1:0] sa, sb;
  logic [29:0]   fa, fb;

  posit_decode #(.HARDEN(HARDEN)) u_da (.p(a), .sign(sga), .zero(za), .nar(na), .scale(sa), .frac(fa));
  posit_decode #(.HARDEN(HARDEN)) u_db (.p(b), .sign(sgb), .zero(zb), .nar(nb), .scale(sb), .frac(fb));

  // ---- scale path ------------------------------------------------------------
  logic          a_big;
  logic [XW-1:0] d, s_big;
  logic [6:0]    z;

  assign d     = add_s[0];
  assign a_big = ~d[XW-1];
  assign s_big = a_big ? sa : sb;

  assign add_a[0] = sa;     assign add_b[0] = ~sb;                     assign add_cin[0] = 1'b1;
  assign add_a[1] = s_big;  assign add_b[1] = '0;                      assign add_cin[1] = 1'b1;
  assign add_a[2] = add_s[1]; assign add_b[2] = ~{{(XW-7){1'b0}}, z};  assign add_cin[2] = 1'b1;

  // ---- fraction path -----------------------------------------------------------
  logic [63:0] fbig, fsm, fsm0, fsh;
  logic [XW-1:0] sh;
  logic        sticky, sg_big, sg_sm, subtract;
  logic [64:0] diff;
  logic [63:0] mag, norm;
  logic        sg_res, mzero;

  always_comb begin
    fbig   = {1'b0, (a_big ? fa : fb), 33'd0};
    fsm0   = {1'b0, (a_big ? fb : fa), 33'd0};
    sg_big = a_big ? sga : sgb;
    sg_sm  = a_big ? sgb : sga;
    // right shift by d, or by ~d and one more position when b is larger
    fsm = a_big ? fsm0 : (fsm0 >> 1);
    sh  = a_big ? d : ~d;
    if (sh >= XW'(64)) begin
      fsh    = '0;
      sticky = |fsm;
    end else begin
      fsh    = fsm >> sh;
      sticky = |(fsm & ~(64'hFFFF_FFFF_FFFF_FFFF << sh));
    end
    // the bit shifted out of fsm0 when b is larger counts as sticky as well
    if (!a_big && fsm0[0]) sticky = 1'b1;
    fsh[0]   = fsh[0] | sticky;
    subtract = sg_big ^ sg_sm;
    if (subtract) diff = {1'b0, fbig} - {1'b0, fsh};
    else          diff = {1'b0, fbig} + {1'b0, fsh};
    if (diff[64] && subtract) begin
      mag    = 64'(-diff);
      sg_res = ~sg_big;
    end else begin
      mag    = diff[63:0];
      sg_res = sg_big;
    end
  end

  clz_hm #(.W(64), .HARDEN(1'b0)) u_nclz (.x(mag), .cnt(z[5:0]), .zero(mzero));
  assign z[6] = 1'b0;
  assign norm = mag << z[5:0];

  always_comb begin
    enc.pass     = na || nb || za || zb;
    enc.pass_val = (na || nb) ? {1'b1, {(PS_N-1){1'b0}}} : (za ? b : a);
    enc.zero     = mzero;
    enc.sign     = sg_res;
    enc.scale    = add_s[2];
    enc.mant     = norm;
  end
endmodule
