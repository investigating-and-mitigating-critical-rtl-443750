// posit_encode: Posit(32,2) result encoder with regime generation and
// rounding (the "rounding" and "encoding" steps).
//
// The signed scale splits into regime k = scale >>> 2 and exponent
// e = scale & 3. The regime generator builds k+1 ones and a zero (k >= 0) or
// -k zeros and a one (k < 0); exponent and fraction bits are shifted in
// behind it, the bit string is cut to 31 bits and rounded to nearest, ties to
// even, on the bit string. Scales beyond +-120 saturate to maxpos/minpos, as
// posits neither overflow nor underflow. The magnitude is then negated for a
// negative result. Zero and pass-through cases bypass the encoder.
// Purely combinational.
module posit_encode
  import fpp_pkg::*;
(
  input  ps_enc_t         enc,
  output logic [PS_N-1:0] p
);
  logic signed [XW-1:0] sc, k;
  logic [1:0]   e;
  logic [95:0]  x, rmask, body;
  logic [5:0]   rlen;
  logic [30:0]  mag, mag_r;
  logic         guard, sticky;

  always_comb begin
    sc   = signed'(enc.scale);
    k    = sc >>> 2;
    e    = enc.scale[1:0];
    x    = {e, enc.mant[62:0], 31'd0};
    if (k >= 0) begin
      rlen  = 6'(k + 2);
      rmask = ~({96{1'b1}} >> (k + 1));
    end else begin
      rlen  = 6'(1 - k);
      rmask = 96'd1 << (95 + k);
    end
    body   = (x >> rlen) | rmask;
    mag    = body[95:65];
    guard  = body[64];
    sticky = |body[63:0];
    mag_r  = mag + 31'(guard && (sticky || mag[0]));
    if (sc > 120)       mag_r = 31'h7FFF_FFFF;
    else if (sc < -120) mag_r = 31'd1;
    if (enc.pass)       p = enc.pass_val;
    else if (enc.zero)  p = '0;
    else if (enc.sign)  p = ~{1'b0, mag_r} + 1'b1;
    else                p = {1'b0, mag_r};
  end
endmodule
