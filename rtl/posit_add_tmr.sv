// posit_add_tmr: Posit(32,2) adder with Triple Modular Redundancy on its
// decoders, scale path and encoder.
//
// The multiplexers of both decoders' CLZ cascades are bit-wise triplicated
// and voted (HARDEN = 1 in posit_add_dp). Each of the three scale adders
// (sa - sb, s_big + 1, s_big + 1 - z) exists three times and a bitwise
// majority voter forms the sum the chain continues with. The encoder is
// triplicated and voted. Masking is purely combinational, so the timing
// never changes: out_valid rises at the first clock edge after the accepting
// edge, handshake as fp32_mul_scr.
// fi: tgt FT_CLA places the fault in adder copy 0 of slot fi.slot, FT_SPARE
// in copy 1, FT_PRED in copy 2. detect reports that a voter saw
// disagreement. The document applies TMR to the same vulnerable structures
// as S-CR; the choice of structures is this design's reading of it.
module posit_add_tmr
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
  output logic            detect
);

  logic [PS_N-1:0] ra, rb;
  logic            busy;

  logic [2:0][XW-1:0] add_a, add_b, add_s;
  logic [2:0]         add_cin;
  logic [2:0]         smis;
  ps_enc_t            enc;

  posit_add_dp #(.HARDEN(1'b1)) u_dp (.a(ra), .b(rb), .add_a(add_a), .add_b(add_b),
                                      .add_cin(add_cin), .add_s(add_s), .enc(enc));

  for (genvar k = 0; k < 3; k++) begin : g_slot
    logic [2:0][XW-1:0] sc;
    for (genvar r = 0; r < 3; r++) begin : g_copy
      cfi_t        f;
      logic [XW:0] c;
      assign f = '{en: fi.en && int'(fi.tgt) == r && int'(fi.slot) == k, idx: fi.idx, val: fi.val};
      cla_adder #(.W(XW)) u_cla (.a(add_a[k]), .b(add_b[k]), .cin(add_cin[k]), .fi(f), .s(sc[r]), .c(c));
    end
    tmr_voter #(.W(XW)) u_v (.a(sc[0]), .b(sc[1]), .c(sc[2]), .y(add_s[k]), .mis(smis[k]));
  end

  logic [2:0][PS_N-1:0] yc;
  logic [PS_N-1:0]      yv;
  logic                 ymis;
  for (genvar i = 0; i < 3; i++) begin : g_enc
    posit_encode u_enc (.enc(enc), .p(yc[i]));
  end
  tmr_voter #(.W(PS_N)) u_vote (.a(yc[0]), .b(yc[1]), .c(yc[2]), .y(yv), .mis(ymis));

  assign detect   = busy && ((|smis) || ymis);
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
      end else begin
        y         <= yv;
        out_valid <= 1'b1;
        busy      <= 1'b0;
      end
    end
  end

endmodule
