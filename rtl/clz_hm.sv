// clz_hm: count leading zeros of a W-bit word (W a power of two) as a
// cascade of log2(W) stages.
//
// Stage l tests whether the upper W/2^(l+1) bits of the current word are all
// zero; if so it sets count bit (log2(W)-1-l) and a multiplexer shifts the
// word left by that amount, otherwise the word passes unchanged. After the
// last stage the count is complete; zero reports an all-zero input (count is
// then W-1). With HARDEN = 1 every stage multiplexer is a bit-wise redundant
// hmux, the protection the document gives the CLZs of the Posit decoder.
// The stage words live in one array v, so Verilator reports circular logic
// (UNOPTFLAT) on it; each stage reads only the previous element and there is
// no real loop.
// Purely combinational.
module clz_hm #(
  parameter int W      = 32,
  parameter bit HARDEN = 1'b1
) (
  input  logic [W-1:0]         x,
  output logic [$clog2(W)-1:0] cnt,
  output logic                 zero
);
  localparam int L = $clog2(W);

  logic [W-1:0] v [0:L];
  assign v[0] = x;

  for (genvar l = 0; l < L; l++) begin : g_stage
    localparam int SH = W >> (l + 1);
    logic z;
    assign z = (v[l][W-1 -: SH] == '0);
    assign cnt[L-1-l] = z;
    if (HARDEN) begin : g_h
      hmux #(.W(W)) u_m (.a(v[l]), .b(v[l] << SH), .sel(z), .y(v[l+1]));
    end else begin : g_p
      assign v[l+1] = z ? (v[l] << SH) : v[l];
    end
  end

  assign zero = ~v[L][W-1];
endmodule
