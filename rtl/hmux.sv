// hmux: bit-wise redundant 2:1 multiplexer, y = sel ? b : a.
//
// Three independent multiplexers compute each output bit and a bitwise
// majority voter picks the result, so one stuck-at inside any single copy
// (its select path included) cannot reach y. It stands for the redundant
// multiplexer cell the document places inside the count-leading-zeros
// cascades of the Posit decoder; the triplicate-and-vote form of the cell is
// this design's choice. Purely combinational.
module hmux #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sel,
  output logic [W-1:0] y
);
  logic [2:0][W-1:0] m;
  logic              mis;
  for (genvar i = 0; i < 3; i++) begin : g_m
    assign m[i] = sel ? b : a;
  end
  tmr_voter #(.W(W)) u_v (.a(m[0]), .b(m[1]), .c(m[2]), .y(y), .mis(mis));
endmodule
