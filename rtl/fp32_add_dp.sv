// fp32_add_dp: combinational IEEE-754 single-precision adder datapath whose
// three exponent adders live outside the module.
//
// Exponent path, through the external adder slots:
//   slot 0 (-): d = ea - eb               picks the larger operand and the shift
//   slot 1 (-): e_big - z                 z = leading zeros of the raw sum
//   slot 2 (+): (e_big - z) + 1 + rovf    rovf = carry out of the rounding
// Significand path: the smaller significand is shifted right by |d| (for
// d < 0 the shift is ~d plus one fixed position, so no negation adder is
// needed), the bits shifted out are OR-ed into the least significant bit, the
// significands are added or subtracted in 64 bits, the magnitude is
// normalized by a count-leading-zeros z and a left shift, and rounded to
// nearest, ties to even. The result goes to fp32_mul_pack, which handles
// NaN, infinity, overflow and underflow for both FP cores.
// Special cases: NaN in, or inf - inf, gives NaN; an infinity passes with its
// sign; subnormal inputs count as zero and results below the smallest normal
// flush to zero (as in fp32_mul_dp); an exact zero sum is +0 unless both
// operands are -0.
// The document hardens the adders computing the result exponent; the slot
// split, the 64-bit significand path and the plain (unhardened) leading-zero
// counter are this design's own choices.
module fp32_add_dp
  import fpp_pkg::*;
(
  input  logic [31:0]        a,
  input  logic [31:0]        b,
  output logic [2:0][XW-1:0] add_a,
  output logic [2:0][XW-1:0] add_b,
  output logic [2:0]         add_cin,
  input  logic [2:0][XW-1:0] add_s,
  output fp_pack_t           pk
);
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  assign ea = a[30:23];
  assign eb = b[30:23];
  assign fa = a[22:0];
  assign fb = b[22:0];
  assign a_zero = (ea == 8'd0);
  assign b_zero = (eb == 8'd0);
  assign a_inf  = (ea == 8'hFF) && (fa == '0);
  assign b_inf  = (eb == 8'hFF) && (fb == '0);
  assign a_nan  = (ea == 8'hFF) && (fa != '0);
  assign b_nan  = (eb == 8'hFF) && (fb != '0);

  // ---- exponent path --------------------------------------------------------
  logic          a_big;
  logic [XW-1:0] d;
  logic [7:0]    e_big;
  logic [5:0]    z;
  logic          rovf;

  assign d     = add_s[0];
  assign a_big = ~d[XW-1];
  assign e_big = a_big ? ea : eb;

  assign add_a[0] = {2'b00, ea};     assign add_b[0] = ~{2'b00, eb};            assign add_cin[0] = 1'b1;
  assign add_a[1] = {2'b00, e_big};  assign add_b[1] = ~{{(XW-6){1'b0}}, z};    assign add_cin[1] = 1'b1;
  assign add_a[2] = add_s[1];        assign add_b[2] = {{(XW-1){1'b0}}, rovf};  assign add_cin[2] = 1'b1;

  // ---- significand path -----------------------------------------------------
  logic [23:0] ma, mb;
  logic [63:0] fbig, fsm, fsm0, fsh, mag, norm;
  logic [XW-1:0] sh;
  logic        sticky, subtract, sg_res, mzero;
  logic [64:0] diff;

  assign ma = a_zero ? 24'd0 : {1'b1, fa};
  assign mb = b_zero ? 24'd0 : {1'b1, fb};

  always_comb begin
    fbig = {1'b0, (a_big ? ma : mb), 39'd0};
    fsm0 = {1'b0, (a_big ? mb : ma), 39'd0};
    fsm  = a_big ? fsm0 : (fsm0 >> 1);
    sh   = a_big ? d : ~d;
    if (sh >= XW'(64)) begin
      fsh    = '0;
      sticky = |fsm;
    end else begin
      fsh    = fsm >> sh;
      sticky = |(fsm & ~(64'hFFFF_FFFF_FFFF_FFFF << sh));
    end
    fsh[0]   = fsh[0] | sticky;
    subtract = a[31] ^ b[31];
    if (subtract) diff = {1'b0, fbig} - {1'b0, fsh};
    else          diff = {1'b0, fbig} + {1'b0, fsh};
    if (diff[64] && subtract) begin
      mag    = 64'(-diff);
      sg_res = ~(a_big ? a[31] : b[31]);
    end else begin
      mag    = diff[63:0];
      sg_res = a_big ? a[31] : b[31];
    end
  end

  clz_hm #(.W(64), .HARDEN(1'b0)) u_nclz (.x(mag), .cnt(z), .zero(mzero));
  assign norm = mag << z;

  logic [22:0] man_t;
  logic        guard, rsticky, rup;
  logic [23:0] man_r;

  always_comb begin
    man_t   = norm[62:40];
    guard   = norm[39];
    rsticky = |norm[38:0];
    rup     = guard && (rsticky || man_t[0]);
    man_r   = {1'b0, man_t} + {23'd0, rup};
    rovf    = man_r[23];
  end

  always_comb begin
    pk.nan  = a_nan || b_nan || (a_inf && b_inf && (a[31] != b[31]));
    pk.inf  = a_inf || b_inf;
    pk.zero = mzero;
    pk.sign = a_inf ? a[31] : b_inf ? b[31] : mzero ? (a[31] & b[31]) : sg_res;
    pk.exp  = add_s[2];
    pk.man  = man_r[22:0];
  end
endmodule
