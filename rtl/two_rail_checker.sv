// two_rail_checker: the dual-rail checker (DRC) of the S-CR scheme.
//
// Each carry i forms a two-rail pair (x[i], ~y[i]) from the CLA carry x and
// the predicted carry y; the pair is a valid code word (01 or 10) when the
// two carries agree. A balanced tree of two-rail cells merges pairs:
// z0 = a0&b0 | a1&b1, z1 = a0&b1 | a1&b0. The final pair z is complementary
// exactly when every input pair is, so err = (z[1] == z[0]) flags any
// disagreement, and a stuck-at inside the checker itself also shows up as a
// non-code output. Purely combinational.
module two_rail_checker #(
  parameter int N = 11
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [1:0]   z,
  output logic         err
);

  localparam int L = (N <= 1) ? 1 : $clog2(N);
  localparam int M = 1 << L;

  logic [M-1:0] r0 [0:L];
  logic [M-1:0] r1 [0:L];

  always_comb begin
    for (int i = 0; i < M; i++) begin
      // unused leaves carry a fixed valid code word (01)
      r0[0][i] = (i < N) ? x[i]  : 1'b0;
      r1[0][i] = (i < N) ? ~y[i] : 1'b1;
    end
    for (int l = 0; l < L; l++) begin
      for (int i = 0; i < M; i++) begin
        if (i < (M >> (l + 1))) begin
          r0[l+1][i] = (r0[l][2*i] & r0[l][2*i+1]) | (r1[l][2*i] & r1[l][2*i+1]);
          r1[l+1][i] = (r0[l][2*i] & r1[l][2*i+1]) | (r1[l][2*i] & r0[l][2*i+1]);
        end else begin
          r0[l+1][i] = 1'b0;
          r1[l+1][i] = 1'b0;
        end
      end
    end
  end

  assign z   = {r1[L][0], r0[L][0]};
  assign err = (z[1] == z[0]);

endmodule
