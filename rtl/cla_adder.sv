// cla_adder: W-bit carry-lookahead adder that brings out every carry.
//
// The carries are computed from group generate/propagate signals with a
// parallel-prefix (Kogge-Stone style) network, so each carry c[i] is a
// lookahead function of a, b and cin rather than a ripple chain. All carries
// c[0]=cin .. c[W]=carry-out leave the module so that the self-check of the
// S-CR scheme can compare them with an independent carry chain.
//
// fi forces carry net c[fi.idx] (1..W) to fi.val when fi.en is set. It is a
// testability aid of this design, used to emulate a stuck-at fault.
// When a core chains adder slots (one slot's sum is the next slot's operand,
// through the same packed port array), Verilator reports circular logic
// (UNOPTFLAT) on these ports: the loop exists only at the granularity of the
// array, not between gates, and is left as is.
// Purely combinational.
module cla_adder
  import fpp_pkg::*;
#(
  parameter int W = XW
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  cfi_t         fi,
  output logic [W-1:0] s,
  output logic [W:0]   c
);

  logic [W-1:0] g0, p0;
  assign g0 = a & b;
  assign p0 = a ^ b;

  // prefix network: after the last level, gp[i] covers bits i..0
  logic [W-1:0] gl [0:$clog2(W)];
  logic [W-1:0] pl [0:$clog2(W)];

  always_comb begin
    gl[0] = g0;
    pl[0] = p0;
    // fold cin into bit 0 so that gl[..][i] becomes carry c[i+1]
    gl[0][0] = g0[0] | (p0[0] & cin);
    for (int l = 0; l < $clog2(W); l++) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (1 << l)) begin
          gl[l+1][i] = gl[l][i] | (pl[l][i] & gl[l][i-(1<<l)]);
          pl[l+1][i] = pl[l][i] & pl[l][i-(1<<l)];
        end else begin
          gl[l+1][i] = gl[l][i];
          pl[l+1][i] = pl[l][i];
        end
      end
    end
  end

  always_comb begin
    c[0] = cin;
    for (int i = 1; i <= W; i++) begin
      c[i] = gl[$clog2(W)][i-1];
      if (fi.en && int'(fi.idx) == i) c[i] = fi.val;
    end
  end

  assign s = p0 ^ c[W-1:0];

endmodule
