// fpp_pkg: constants and types shared by the hardened FP32 multiplier and
// the hardened Posit(32,2) adder.
//
// Formats: IEEE-754 single precision (1 sign, 8 exponent, 23 fraction bits)
// and Posit(32,2) (32 bits, 2 exponent bits, useed = 16). The exponent/scale
// datapath of both cores is 10 bits wide, signed, which holds every
// intermediate exponent without wrap-around.
//
// fi_t is a fault-injection control, this design's own testability aid: it
// forces one carry net of one adder (or of one carry predictor) to a constant
// value, emulating the permanent stuck-at faults the hardening targets. With
// en = 0 it has no effect.
package fpp_pkg;

  localparam int FP_W     = 32;
  localparam int FP_EXP_W = 8;
  localparam int FP_MAN_W = 23;
  localparam int FP_BIAS  = 127;

  localparam int PS_N  = 32;
  localparam int PS_ES = 2;

  // width of the checked exponent / scale adders
  localparam int XW = 10;

  // number of checked adder slots per core (Fig. 7: three exponent adders)
  localparam int FP_NSLOT = 3;

  // fault target: which unit of a slot bank a fault is placed in
  typedef enum logic [1:0] {
    FT_CLA  = 2'd0,   // the working CLA of slot `slot`
    FT_SPARE = 2'd1,  // the cold spare CLA
    FT_PRED = 2'd2    // the carry predictor (R) of slot `slot`
  } ftgt_e;

  typedef struct packed {
    logic       en;      // inject
    ftgt_e      tgt;     // which unit
    logic [1:0] slot;    // slot index for FT_CLA / FT_PRED
    logic [3:0] idx;     // carry net index 1..XW
    logic       val;     // stuck-at value
  } fi_t;

  localparam fi_t FI_NONE = '{en: 1'b0, tgt: FT_CLA, slot: 2'd0, idx: 4'd0, val: 1'b0};

  // per-adder stuck-at control, derived from fi_t by the bank
  typedef struct packed {
    logic       en;
    logic [3:0] idx;
    logic       val;
  } cfi_t;

  // status of a self-check-and-repair bank
  typedef struct packed {
    logic       spare_used;    // the spare replaces a working CLA
    logic [1:0] spare_slot;    // which slot it replaces
    logic       pred_fault;    // a carry predictor was found faulty; its checks are ignored
    logic       alarm;         // a fault was detected that could not be repaired
  } scr_status_t;

  // fields handed from the FP32 multiplier datapath to its pack stage
  typedef struct packed {
    logic          sign;
    logic          nan;      // either operand NaN, or 0 x inf
    logic          inf;      // either operand infinite (and not nan)
    logic          zero;     // either operand zero or subnormal (flushed)
    logic [XW-1:0] exp;      // biased result exponent, signed, after normalization and rounding
    logic [FP_MAN_W-1:0] man; // rounded fraction
  } fp_pack_t;

  // fields handed from the Posit adder datapath to its encoder
  typedef struct packed {
    logic          pass;     // result is pass_val unchanged (zero operand, NaR)
    logic [PS_N-1:0] pass_val;
    logic          zero;     // exact cancellation
    logic          sign;
    logic [XW-1:0] scale;    // signed scale of the leading one of mant
    logic [63:0]   mant;     // normalized magnitude, leading one at bit 63
  } ps_enc_t;

endpackage
