// tmr_voter: bitwise two-out-of-three majority voter used by the TMR parts of
// every hardening scheme. y[i] = a[i]&b[i] | a[i]&c[i] | b[i]&c[i]; mis flags
// that the three copies are not identical (for diagnosis only).
// Purely combinational.
module tmr_voter #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         mis
);
  assign y   = (a & b) | (a & c) | (b & c);
  assign mis = (a != b) || (a != c);
endmodule
