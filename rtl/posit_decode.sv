// posit_decode: Posit(32,2) operand decoder (the "decoding and checking"
// step).
//
// The operand is made positive (two's complement when the sign is set), the
// regime run is measured with a count-leading-zeros of the body (inverted
// first when the run is of ones), and the body is shifted past the regime
// and its terminating bit to expose the 2 exponent bits and the fraction.
// Outputs: sign, zero, nar (0x80000000), the signed scale 4*k + e (k = run-1
// for a run of ones, -run for a run of zeros) and the fraction with its
// hidden one at bit 29. HARDEN selects redundant multiplexers (hmux) both
// in the CLZ and in the logarithmic shifter that moves the body past the
// regime, as the document does for the regime-computation shifters; the
// shifter's stage words share one array, so Verilator reports circular logic
// (UNOPTFLAT) on it although each stage reads only the previous one.
// Purely combinational.
module posit_decode
  import fpp_pkg::*;
#(
  parameter bit HARDEN = 1'b0
) (
  input  logic [PS_N-1:0] p,
  output logic            sign,
  output logic            zero,
  output logic            nar,
  output logic [XW-1:0]   scale,
  output logic [29:0]     frac
);
  logic [PS_N-1:0] ab;
  logic [30:0]     body, runx, rem;
  logic            r0, zall;
  logic [4:0]      m;
  logic [1:0]      e;
  logic signed [XW-1:0] k;

  assign sign = p[PS_N-1];
  assign zero = (p == '0);
  assign nar  = (p == {1'b1, {(PS_N-1){1'b0}}});
  assign ab   = sign ? (~p + 1'b1) : p;
  assign body = ab[30:0];
  assign r0   = body[30];
  assign runx = r0 ? ~body : body;

  // run length = leading zeros of runx; the appended one bounds it at 31
  clz_hm #(.W(32), .HARDEN(HARDEN)) u_clz (.x({runx, 1'b1}), .cnt(m), .zero(zall));

  // regime shifter: stage l shifts left by 2^l when m[l] is set
  logic [30:0] sv [0:5];
  assign sv[0] = body;
  for (genvar l = 0; l < 5; l++) begin : g_sh
    if (HARDEN) begin : g_h
      hmux #(.W(31)) u_m (.a(sv[l]), .b(sv[l] << (1 << l)), .sel(m[l]), .y(sv[l+1]));
    end else begin : g_p
      assign sv[l+1] = m[l] ? (sv[l] << (1 << l)) : sv[l];
    end
  end
  assign rem   = sv[5] << 1;
  assign e     = rem[30:29];
  assign frac  = {1'b1, rem[28:0]};
  assign k     = r0 ? (signed'(XW'(m)) - XW'(1)) : -signed'(XW'(m));
  assign scale = XW'({k, e});

  logic unused;
  assign unused = zall;
endmodule
