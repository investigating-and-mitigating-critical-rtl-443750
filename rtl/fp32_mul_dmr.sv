// fp32_mul_dmr: IEEE-754 single-precision multiplier with Dual Modular
// Redundancy on the exponent path.
//
// Each of the three exponent adders of fp32_mul_dp exists twice (copy 0 is
// the working unit, copy 1 the redundant one). An XOR array compares the two
// copies' sums. When they differ the core switches, for good, to the
// redundant outputs and re-executes the operation once, which costs one extra
// cycle; later mismatches are only reported. The pack stage is not
// duplicated. Handshake as fp32_mul_scr: out_valid rises at the first clock
// edge after the accepting edge, at the second when a mismatch is first seen.
// fi: tgt FT_CLA places the fault in copy 0 of slot fi.slot, FT_SPARE in
// copy 1. Choosing the copy on a mismatch follows the document ("the
// redundant outputs are used"); the retry cycle is this design's choice.
module fp32_mul_dmr
  import fpp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  fi_t         fi,
  output logic        out_valid,
  output logic [31:0] y,
  output logic        detect,
  output logic        switched
);

  logic [31:0] ra, rb;
  logic        busy, sel_q;

  logic [2:0][XW-1:0] add_a, add_b, add_s;
  logic [2:0][XW-1:0] s0, s1;
  logic [2:0]         add_cin;
  fp_pack_t           pk;
  logic [31:0]        yv;

  fp32_mul_dp u_dp (.a(ra), .b(rb), .add_a(add_a), .add_b(add_b), .add_cin(add_cin),
                    .add_s(add_s), .pk(pk));
  fp32_mul_pack u_pack (.pk(pk), .y(yv));

  for (genvar k = 0; k < 3; k++) begin : g_slot
    cfi_t f0, f1;
    logic [XW:0] c0, c1;
    assign f0 = '{en: fi.en && fi.tgt == FT_CLA   && int'(fi.slot) == k, idx: fi.idx, val: fi.val};
    assign f1 = '{en: fi.en && fi.tgt == FT_SPARE && int'(fi.slot) == k, idx: fi.idx, val: fi.val};
    cla_adder #(.W(XW)) u_c0 (.a(add_a[k]), .b(add_b[k]), .cin(add_cin[k]), .fi(f0), .s(s0[k]), .c(c0));
    cla_adder #(.W(XW)) u_c1 (.a(add_a[k]), .b(add_b[k]), .cin(add_cin[k]), .fi(f1), .s(s1[k]), .c(c1));
    assign add_s[k] = sel_q ? s1[k] : s0[k];
  end

  logic mismatch;
  assign mismatch = |(s0 ^ s1);
  assign detect   = busy && mismatch;
  assign in_ready = !busy;
  assign switched = sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      sel_q     <= 1'b0;
      ra        <= '0;
      rb        <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          ra   <= a;
          rb   <= b;
          busy <= 1'b1;
        end
      end else if (mismatch && !sel_q) begin
        sel_q <= 1'b1;           // continue on the redundant copy, re-execute
      end else begin
        y         <= yv;
        out_valid <= 1'b1;
        busy      <= 1'b0;
      end
    end
  end

endmodule
