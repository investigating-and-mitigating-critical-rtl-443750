// scr_adder_bank: Self-Check and Repair (S-CR) for a group of adders.
//
// The exponent (FP) or scale (Posit) adders of a core form NSLOT slots. Each
// slot has a working carry-lookahead adder, an independent carry predictor
// (R) and a dual-rail checker (DRC) comparing the CLA carries with R's
// carries; R's predicted sum parity is also compared with the parity of the
// sum. One cold spare CLA serves the whole bank: its inputs are held at zero
// until a controller (CNT) switches it in, through input and output
// multiplexers, in place of the slot found faulty.
//
// Controller timing. The core raises chk in every cycle in which the slot
// inputs hold a live operation and takes the sums when ok is high. If a
// check fails in such a cycle, ok stays low, hold goes high and CNT spends
// one cycle on diagnosis and spare activation (ACT) and one cycle on the
// re-execution (CORR), in which ok is raised and the sums are taken from the
// repaired bank: a detected fault costs two extra cycles, as in the document.
// The core must keep its operands stable while hold is high.
//
// Diagnosis, this design's own rule: a first failure in slot k moves the
// spare into slot k. If slot k fails again with the spare in place, the
// common part, R of slot k, is the faulty one: its checks are ignored from
// then on (status.pred_fault) and the spare keeps serving the slot. A failure
// in another slot once the spare is taken cannot be repaired and raises
// status.alarm; the result is then delivered as computed.
//
// The spare-selection registers are triplicated and voted, standing in for
// the TMR protection the document applies to the repair multiplexers.
// fi places one stuck-at fault on a carry net (see fpp_pkg::fi_t).
// The cores chain the slots (a slot's sum is another slot's operand through
// the packed a/b/s arrays), so Verilator reports circular logic (UNOPTFLAT)
// on the slot and spare signals; the loop exists only at array granularity,
// the gates form no cycle.
module scr_adder_bank
  import fpp_pkg::*;
#(
  parameter int W     = XW,
  parameter int NSLOT = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      chk,
  input  logic [NSLOT-1:0][W-1:0]   a,
  input  logic [NSLOT-1:0][W-1:0]   b,
  input  logic [NSLOT-1:0]          cin,
  input  fi_t                       fi,
  output logic [NSLOT-1:0][W-1:0]   s,
  output logic                      ok,
  output logic                      hold,
  output logic                      det,      // a check failed this cycle
  output scr_status_t               status
);

  typedef enum logic [1:0] {RUN = 2'd0, ACT = 2'd1, CORR = 2'd2} st_e;
  st_e st;

  // ---- triplicated spare map -------------------------------------------
  logic [2:0] used_q;
  logic [2:0][1:0] slot_q;
  logic used_v;
  logic [1:0] slot_v;
  logic used_mis, slot_mis;

  tmr_voter #(.W(1)) u_vu (.a(used_q[0]), .b(used_q[1]), .c(used_q[2]), .y(used_v), .mis(used_mis));
  tmr_voter #(.W(2)) u_vs (.a(slot_q[0]), .b(slot_q[1]), .c(slot_q[2]), .y(slot_v), .mis(slot_mis));

  logic [NSLOT-1:0] pred_bad;
  logic             alarm_q;
  logic [1:0]       eslot_q;   // slot that failed in the RUN cycle

  // ---- fault-injection decode -------------------------------------------
  function automatic cfi_t pick(input fi_t f, input ftgt_e t, input int k);
    cfi_t r;
    r.en  = f.en && (f.tgt == t) && (t == FT_SPARE || int'(f.slot) == k);
    r.idx = f.idx;
    r.val = f.val;
    return r;
  endfunction

  // ---- spare input muxes (cold: zero when unused) -----------------------
  logic [W-1:0] sp_a, sp_b;
  logic         sp_cin;
  logic [W-1:0] sp_s;
  logic [W:0]   sp_c;

  always_comb begin
    sp_a = '0; sp_b = '0; sp_cin = 1'b0;
    for (int k = 0; k < NSLOT; k++) begin
      if (used_v && int'(slot_v) == k) begin
        sp_a = a[k]; sp_b = b[k]; sp_cin = cin[k];
      end
    end
  end

  cla_adder #(.W(W)) u_spare (.a(sp_a), .b(sp_b), .cin(sp_cin), .fi(pick(fi, FT_SPARE, 0)),
                              .s(sp_s), .c(sp_c));

  // ---- working slots ------------------------------------------------------
  logic [NSLOT-1:0] serr;

  for (genvar k = 0; k < NSLOT; k++) begin : g_slot
    logic [W-1:0] cs, ss;
    logic [W:0]   cc, c1, c2;
    logic         p2, drc_err;
    logic [1:0]   z;
    logic         rep;

    cla_adder #(.W(W)) u_cla (.a(a[k]), .b(b[k]), .cin(cin[k]), .fi(pick(fi, FT_CLA, k)),
                              .s(cs), .c(cc));
    carry_predictor #(.W(W)) u_r (.a(a[k]), .b(b[k]), .cin(cin[k]), .fi(pick(fi, FT_PRED, k)),
                                  .c(c2), .par(p2));

    assign rep  = used_v && (int'(slot_v) == k);
    assign ss   = rep ? sp_s : cs;
    assign c1   = rep ? sp_c : cc;
    assign s[k] = ss;

    two_rail_checker #(.N(W+1)) u_drc (.x(c1), .y(c2), .z(z), .err(drc_err));

    assign serr[k] = !pred_bad[k] && (drc_err || ((^ss) != p2));
  end

  // lowest failing slot
  logic [1:0] fslot;
  always_comb begin
    fslot = '0;
    for (int k = NSLOT - 1; k >= 0; k--) if (serr[k]) fslot = 2'(k);
  end

  assign det  = chk && (|serr);
  assign ok   = chk && ((st == RUN && !(|serr)) || st == CORR);
  assign hold = (st == ACT) || (st == RUN && det);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= RUN;
      used_q   <= '0;
      slot_q   <= '0;
      pred_bad <= '0;
      alarm_q  <= 1'b0;
      eslot_q  <= '0;
    end else begin
      // voted values are written back, so a single upset register is scrubbed
      used_q <= {3{used_v}};
      slot_q <= {3{slot_v}};
      case (st)
        RUN: if (det) begin
          eslot_q <= fslot;
          st      <= ACT;
        end
        ACT: begin
          if (!used_v) begin
            used_q <= 3'b111;
            slot_q <= {3{eslot_q}};
          end else if (slot_v == eslot_q) begin
            pred_bad[eslot_q] <= 1'b1;
          end else begin
            alarm_q <= 1'b1;
          end
          st <= CORR;
        end
        CORR: if (chk) begin
          // a repeated failure of the slot the spare now serves points at R
          if (det && used_v && fslot == slot_v) pred_bad[slot_v] <= 1'b1;
          else if (det) alarm_q <= 1'b1;
          st <= RUN;
        end
        default: st <= RUN;
      endcase
    end
  end

  assign status = '{spare_used: used_v, spare_slot: slot_v,
                    pred_fault: |pred_bad, alarm: alarm_q};

`ifndef SYNTHESIS
  // the repair sequence always takes exactly two cycles once started
  a_act_to_corr: assert property (@(posedge clk) disable iff (!rst_n) st == ACT |=> st == CORR);
`endif

endmodule
