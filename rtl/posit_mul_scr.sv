// posit_mul_scr: Posit(32,2) multiplier hardened against the faults that cause
// large errors.
//
// Three protections cover the decoder, the scale path and the encoder:
//  * DECO: the count-leading-zeros cascades of both operand decoders use
//    bit-wise redundant multiplexers (HARDEN = 1 in posit_mul_dp).
//  * Scale path: the two adders of posit_mul_dp (sa + sb, then + the
//    normalization step) are the slots of an scr_adder_bank, checked by an
//    independent carry chain and a dual-rail checker, with a cold spare
//    switched in by the controller.
//  * ENCO: the encoder, with its regime generator and rounding, is
//    triplicated and voted bit by bit.
// The fraction multiplier and the normalization shift are not hardened.
// The document evaluates this core hardened by S-CR; the two-slot grouping
// and the triplicated encoder are this design's own reading of it.
//
// Interface and timing as fp32_mul_scr: an operation is accepted on
// in_valid && in_ready, out_valid pulses with the product at the first clock edge
// after the accepting edge, at the third when a fault is detected and
// repaired. detect pulses in each cycle a
// check fails.
module posit_mul_scr
  import fpp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [PS_N-1:0] a,
  input  logic [PS_N-1:0] b,
  input  fi_t             fi,
  output logic            out_valid,
  output logic [PS_N-1:0] y,
  output logic            detect,
  output scr_status_t     status
);
  logic [PS_N-1:0] ra, rb;
  logic            busy;

  logic [1:0][XW-1:0] add_a, add_b, add_s;
  logic [1:0]         add_cin;
  ps_enc_t            enc;
  logic               ok, hold;

  posit_mul_dp #(.HARDEN(1'b1)) u_dp (.a(ra), .b(rb), .add_a(add_a), .add_b(add_b),
                                      .add_cin(add_cin), .add_s(add_s), .enc(enc));

  scr_adder_bank #(.W(XW), .NSLOT(2)) u_bank (
    .clk(clk), .rst_n(rst_n), .chk(busy), .a(add_a), .b(add_b), .cin(add_cin), .fi(fi),
    .s(add_s), .ok(ok), .hold(hold), .det(detect), .status(status));

  logic [2:0][PS_N-1:0] yc;
  logic [PS_N-1:0]      yv;
  logic                 ymis;
  for (genvar i = 0; i < 3; i++) begin : g_enc
    posit_encode u_enc (.enc(enc), .p(yc[i]));
  end
  tmr_voter #(.W(PS_N)) u_vote (.a(yc[0]), .b(yc[1]), .c(yc[2]), .y(yv), .mis(ymis));

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
  a_hold: assert property (@(posedge clk) disable iff (!rst_n) hold |=> busy && $stable(ra) && $stable(rb));
`endif
endmodule
