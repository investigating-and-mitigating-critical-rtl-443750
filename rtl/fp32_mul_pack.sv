// fp32_mul_pack: final sign/exponent/special-case selection of the FP32
// multiplier. Priority: NaN (0x7FC00000), infinity, zero (signed), exponent
// overflow (>= 255, signed infinity), exponent underflow (<= 0, flushed to a
// signed zero), otherwise {sign, exp[7:0], man}. This selection is the
// multiplexer logic on the exponent path that the hardened cores triplicate.
// Purely combinational.
module fp32_mul_pack
  import fpp_pkg::*;
(
  input  fp_pack_t    pk,
  output logic [31:0] y
);
  logic signed [XW-1:0] e;
  assign e = signed'(pk.exp);

  always_comb begin
    if (pk.nan)             y = 32'h7FC0_0000;
    else if (pk.inf)        y = {pk.sign, 8'hFF, 23'd0};
    else if (pk.zero)       y = {pk.sign, 31'd0};
    else if (e >= 255)      y = {pk.sign, 8'hFF, 23'd0};
    else if (e <= 0)        y = {pk.sign, 31'd0};
    else                    y = {pk.sign, pk.exp[7:0], pk.man};
  end
endmodule
