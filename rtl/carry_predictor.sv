// carry_predictor: the "R" circuit of the Self-Check and Repair scheme.
//
// It recomputes the carries of an addition with a plain ripple chain,
// c2[i+1] = a[i]&b[i] | c2[i]&(a[i]|b[i]), which shares no logic with the
// lookahead network of the CLA it checks. It also predicts the parity of the
// sum, par = ^a ^ ^b ^ ^c2[W-1:0], which the bank compares with the parity
// of the CLA's sum. fi forces one predicted carry, as in cla_adder.
// Purely combinational.
module carry_predictor
  import fpp_pkg::*;
#(
  parameter int W = XW
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  cfi_t         fi,
  output logic [W:0]   c,
  output logic         par
);

  always_comb begin
    c[0] = cin;
    for (int i = 0; i < W; i++) begin
      c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] | b[i]));
      if (fi.en && int'(fi.idx) == i + 1) c[i+1] = fi.val;
    end
  end

  assign par = (^a) ^ (^b) ^ (^c[W-1:0]);

endmodule
