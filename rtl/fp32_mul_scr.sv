// fp32_mul_scr: IEEE-754 single-precision multiplier hardened with
// Self-Check and Repair (S-CR) on the exponent path.
//
// The three exponent adders of fp32_mul_dp (ea+eb, -bias, +normalization)
// are the slots of an scr_adder_bank: each is a carry-lookahead adder checked
// by an independent carry chain (R) through a dual-rail checker, with one cold
// spare CLA and a controller that swaps the spare in. The final
// exponent/special-case selection (fp32_mul_pack) is triplicated and voted.
// The significand multiplier is left as it is: its faults give small errors.
//
// Interface and timing: an operation is accepted when in_valid and in_ready
// are both high; operands are registered and evaluated in the following
// cycle (EXEC). out_valid is a one-cycle pulse with the product in y. It
// rises at the first clock edge after the accepting edge when no fault is
// detected, and at the third when the checker fires and the spare is
// switched in (one extra cycle for detection and spare activation, one for
// the corrected re-execution). in_ready is low
// from acceptance until out_valid. detect pulses in each cycle a check fails.
// The valid/ready handshake and the non-pipelined issue are this design's
// own choices.
module fp32_mul_scr
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
  output scr_status_t status
);

  logic [31:0] ra, rb;
  logic        busy;

  logic [2:0][XW-1:0] add_a, add_b, add_s;
  logic [2:0]         add_cin;
  fp_pack_t           pk;
  logic               ok, hold;

  fp32_mul_dp u_dp (.a(ra), .b(rb), .add_a(add_a), .add_b(add_b), .add_cin(add_cin),
                    .add_s(add_s), .pk(pk));

  scr_adder_bank #(.W(XW), .NSLOT(3)) u_bank (
    .clk(clk), .rst_n(rst_n), .chk(busy), .a(add_a), .b(add_b), .cin(add_cin), .fi(fi),
    .s(add_s), .ok(ok), .hold(hold), .det(detect), .status(status));

  // triplicated pack stage
  logic [2:0][31:0] yc;
  logic [31:0]      yv;
  logic             ymis;
  for (genvar i = 0; i < 3; i++) begin : g_pack
    fp32_mul_pack u_pack (.pk(pk), .y(yc[i]));
  end
  tmr_voter #(.W(32)) u_vote (.a(yc[0]), .b(yc[1]), .c(yc[2]), .y(yv), .mis(ymis));

  assign in_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
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
      end else if (ok) begin
        y         <= yv;
        out_valid <= 1'b1;
        busy      <= 1'b0;
      end
    end
  end

`ifndef SYNTHESIS
  // operands must not change while the bank repairs and re-executes
  a_hold: assert property (@(posedge clk) disable iff (!rst_n) hold |=> busy && $stable(ra) && $stable(rb));
`endif

endmodule
