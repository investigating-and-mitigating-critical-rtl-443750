// fp32_mul_dp: combinational IEEE-754 single-precision multiplier datapath
// whose three exponent adders live outside the module.
//
// The steps follow the usual FP organization: sign and exponent processing
// (S&E), significand processing (SP: 24x24 product), normalization (N) and
// rounding (RnD, round to nearest even). The exponent is built by a chain of
// three adders, which a wrapper supplies (plain, self-checked, duplicated or
// triplicated):
//   slot 0: ea + eb
//   slot 1: slot0 + (-127)          (the bias constant)
//   slot 2: slot1 + inc             (inc = normalization shift + rounding carry, 0..2)
// all 10 bits wide and signed, so under- and overflow stay visible.
// The fields for the final exponent/special-case selection go out as a
// fp_pack_t to fp32_mul_pack.
//
// Own choices: subnormal inputs are treated as zero and results below the
// smallest normal are flushed to zero (after rounding, with unbounded
// exponent); any NaN result is the quiet NaN 0x7FC00000.
module fp32_mul_dp
  import fpp_pkg::*;
(
  input  logic [31:0]              a,
  input  logic [31:0]              b,
  output logic [2:0][XW-1:0]       add_a,
  output logic [2:0][XW-1:0]       add_b,
  output logic [2:0]               add_cin,
  input  logic [2:0][XW-1:0]       add_s,
  output fp_pack_t                 pk
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

  // ---- significand processing, normalization, rounding --------------------
  logic [47:0] prod;
  logic        msb;
  logic [22:0] man_t;
  logic        guard, sticky, rup;
  logic [23:0] man_r;
  logic [1:0]  inc;

  assign prod = {1'b1, fa} * {1'b1, fb};
  assign msb  = prod[47];

  always_comb begin
    if (msb) begin
      man_t  = prod[46:24];
      guard  = prod[23];
      sticky = |prod[22:0];
    end else begin
      man_t  = prod[45:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    rup   = guard && (sticky || man_t[0]);
    man_r = {1'b0, man_t} + {23'd0, rup};
    inc   = {1'b0, msb} + {1'b0, man_r[23]};
  end

  // ---- exponent adder chain ---------------------------------------------------
  assign add_a[0]   = {2'b00, ea};
  assign add_b[0]   = {2'b00, eb};
  assign add_cin[0] = 1'b0;
  assign add_a[1]   = add_s[0];
  assign add_b[1]   = XW'(-FP_BIAS);
  assign add_cin[1] = 1'b0;
  assign add_a[2]   = add_s[1];
  assign add_b[2]   = {{(XW-2){1'b0}}, inc};
  assign add_cin[2] = 1'b0;

  assign pk.sign = a[31] ^ b[31];
  assign pk.nan  = a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero);
  assign pk.inf  = a_inf || b_inf;
  assign pk.zero = a_zero || b_zero;
  assign pk.exp  = add_s[2];
  assign pk.man  = man_r[22:0];

endmodule
