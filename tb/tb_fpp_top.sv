// tb_fpp_top: end-to-end test of all twelve hardened units at once, at the
// design's only (default) configuration. Each unit runs a stream of
// operations from the +-1, +-10 and +-100 ranges, checked against the
// reference models, through three phases:
//   1. no fault: every result exact at the fault-free latency;
//   2. one stuck-at fault per unit in a working adder (S-CR units: CLA,
//      DMR: working copy, TMR: one copy): results must stay exact;
//   3. after reset, a stuck-at in a carry predictor of each S-CR unit, then a
//      second faulty CLA in the FP S-CR unit, which cannot be repaired.
// Each mechanism is counted and must happen at least once: S-CR detection
// and spare repair (FP MUL, FP ADD, Posit ADD, Posit MUL), predictor
// diagnosis (FP MUL, FP ADD, Posit ADD, Posit MUL), the
// unrepairable-fault alarm, the DMR switch to the redundant copy and TMR
// masking (for each core that has a DMR and a TMR unit).
module tb_fpp_top;
  import fpp_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n;

  logic fm_iv, fm_ir, fm_ov, fm_det; logic [31:0] fm_a, fm_b, fm_y; fi_t fm_fi; scr_status_t fm_st;
  logic fd_iv, fd_ir, fd_ov, fd_det, fd_sw; logic [31:0] fd_a, fd_b, fd_y; fi_t fd_fi;
  logic ft_iv, ft_ir, ft_ov, ft_det; logic [31:0] ft_a, ft_b, ft_y; fi_t ft_fi;
  logic pa_iv, pa_ir, pa_ov, pa_det; logic [31:0] pa_a, pa_b, pa_y; fi_t pa_fi; scr_status_t pa_st;
  logic pm_iv, pm_ir, pm_ov, pm_det; logic [31:0] pm_a, pm_b, pm_y; fi_t pm_fi; scr_status_t pm_st;
  logic fa_iv, fa_ir, fa_ov, fa_det; logic [31:0] fa_a, fa_b, fa_y; fi_t fa_fi; scr_status_t fa_st;
  logic pd_iv, pd_ir, pd_ov, pd_det, pd_sw; logic [31:0] pd_a, pd_b, pd_y; fi_t pd_fi;
  logic pt_iv, pt_ir, pt_ov, pt_det; logic [31:0] pt_a, pt_b, pt_y; fi_t pt_fi;
  logic ad_iv, ad_ir, ad_ov, ad_det, ad_sw; logic [31:0] ad_a, ad_b, ad_y; fi_t ad_fi;
  logic at_iv, at_ir, at_ov, at_det; logic [31:0] at_a, at_b, at_y; fi_t at_fi;
  logic md_iv, md_ir, md_ov, md_det, md_sw; logic [31:0] md_a, md_b, md_y; fi_t md_fi;
  logic mt_iv, mt_ir, mt_ov, mt_det; logic [31:0] mt_a, mt_b, mt_y; fi_t mt_fi;

  int checks = 0, failures = 0;
  int n_fm_repair = 0, n_pa_repair = 0, n_fm_pred = 0, n_pa_pred = 0;
  int n_pm_repair = 0, n_pm_pred = 0, n_fa_repair = 0, n_fa_pred = 0;
  int n_pd_switch = 0, n_pt_mask = 0, n_ad_switch = 0, n_at_mask = 0, n_md_switch = 0, n_mt_mask = 0;
  int n_alarm = 0, n_dmr_switch = 0, n_tmr_mask = 0, n_ops = 0;
  bit allow_wrong = 0;   // set while a fault the unit cannot repair is active

  always #5 clk = ~clk;

  fpp_top dut (
    .clk(clk), .rst_n(rst_n),
    .fm_in_valid(fm_iv), .fm_in_ready(fm_ir), .fm_a(fm_a), .fm_b(fm_b), .fm_fi(fm_fi),
    .fm_out_valid(fm_ov), .fm_y(fm_y), .fm_detect(fm_det), .fm_status(fm_st),
    .fd_in_valid(fd_iv), .fd_in_ready(fd_ir), .fd_a(fd_a), .fd_b(fd_b), .fd_fi(fd_fi),
    .fd_out_valid(fd_ov), .fd_y(fd_y), .fd_detect(fd_det), .fd_switched(fd_sw),
    .ft_in_valid(ft_iv), .ft_in_ready(ft_ir), .ft_a(ft_a), .ft_b(ft_b), .ft_fi(ft_fi),
    .ft_out_valid(ft_ov), .ft_y(ft_y), .ft_detect(ft_det),
    .pa_in_valid(pa_iv), .pa_in_ready(pa_ir), .pa_a(pa_a), .pa_b(pa_b), .pa_fi(pa_fi),
    .pa_out_valid(pa_ov), .pa_y(pa_y), .pa_detect(pa_det), .pa_status(pa_st),
    .pm_in_valid(pm_iv), .pm_in_ready(pm_ir), .pm_a(pm_a), .pm_b(pm_b), .pm_fi(pm_fi),
    .pm_out_valid(pm_ov), .pm_y(pm_y), .pm_detect(pm_det), .pm_status(pm_st),
    .fa_in_valid(fa_iv), .fa_in_ready(fa_ir), .fa_a(fa_a), .fa_b(fa_b), .fa_fi(fa_fi),
    .fa_out_valid(fa_ov), .fa_y(fa_y), .fa_detect(fa_det), .fa_status(fa_st),
    .pd_in_valid(pd_iv), .pd_in_ready(pd_ir), .pd_a(pd_a), .pd_b(pd_b), .pd_fi(pd_fi),
    .pd_out_valid(pd_ov), .pd_y(pd_y), .pd_detect(pd_det), .pd_switched(pd_sw),
    .pt_in_valid(pt_iv), .pt_in_ready(pt_ir), .pt_a(pt_a), .pt_b(pt_b), .pt_fi(pt_fi),
    .pt_out_valid(pt_ov), .pt_y(pt_y), .pt_detect(pt_det),
    .ad_in_valid(ad_iv), .ad_in_ready(ad_ir), .ad_a(ad_a), .ad_b(ad_b), .ad_fi(ad_fi),
    .ad_out_valid(ad_ov), .ad_y(ad_y), .ad_detect(ad_det), .ad_switched(ad_sw),
    .at_in_valid(at_iv), .at_in_ready(at_ir), .at_a(at_a), .at_b(at_b), .at_fi(at_fi),
    .at_out_valid(at_ov), .at_y(at_y), .at_detect(at_det),
    .md_in_valid(md_iv), .md_in_ready(md_ir), .md_a(md_a), .md_b(md_b), .md_fi(md_fi),
    .md_out_valid(md_ov), .md_y(md_y), .md_detect(md_det), .md_switched(md_sw),
    .mt_in_valid(mt_iv), .mt_in_ready(mt_ir), .mt_a(mt_a), .mt_b(mt_b), .mt_fi(mt_fi),
    .mt_out_valid(mt_ov), .mt_y(mt_y), .mt_detect(mt_det));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  logic pm_used_d, pm_pred_d, fa_used_d, fa_pred_d, pd_sw_d, ad_sw_d, md_sw_d;
  logic fm_used_d, pa_used_d, fm_pred_d, pa_pred_d, fm_alarm_d, fd_sw_d;
  always @(posedge clk) begin
    if (rst_n) begin
      if (fm_st.spare_used && !fm_used_d) n_fm_repair++;
      if (pa_st.spare_used && !pa_used_d) n_pa_repair++;
      if (fm_st.pred_fault && !fm_pred_d) n_fm_pred++;
      if (pa_st.pred_fault && !pa_pred_d) n_pa_pred++;
      if (pm_st.spare_used && !pm_used_d) n_pm_repair++;
      if (pm_st.pred_fault && !pm_pred_d) n_pm_pred++;
      if (fa_st.spare_used && !fa_used_d) n_fa_repair++;
      if (fa_st.pred_fault && !fa_pred_d) n_fa_pred++;
      if (pd_sw && !pd_sw_d) n_pd_switch++;
      if (pt_det) n_pt_mask++;
      if (ad_sw && !ad_sw_d) n_ad_switch++;
      if (at_det) n_at_mask++;
      if (md_sw && !md_sw_d) n_md_switch++;
      if (mt_det) n_mt_mask++;
      if (fm_st.alarm && !fm_alarm_d) n_alarm++;
      if (fd_sw && !fd_sw_d) n_dmr_switch++;
      if (ft_det) n_tmr_mask++;
    end
    fm_used_d <= fm_st.spare_used; pa_used_d <= pa_st.spare_used;
    fm_pred_d <= fm_st.pred_fault; pa_pred_d <= pa_st.pred_fault;
    pm_used_d <= pm_st.spare_used; pm_pred_d <= pm_st.pred_fault;
    fa_used_d <= fa_st.spare_used; fa_pred_d <= fa_st.pred_fault;
    pd_sw_d <= pd_sw; ad_sw_d <= ad_sw; md_sw_d <= md_sw;
    fm_alarm_d <= fm_st.alarm;     fd_sw_d <= fd_sw;
  end

  function automatic real pick_range(input int i);
    case (i % 3)
      0: return 1.0;
      1: return 10.0;
      default: return 100.0;
    endcase
  endfunction

  // unit: 0 = S-CR FP MUL, 1 = DMR FP MUL, 2 = TMR FP MUL, 3 = S-CR Posit ADD,
  // 4 = S-CR Posit MUL, 5 = S-CR FP ADD, 6 = DMR Posit ADD, 7 = TMR Posit ADD,
  // 8 = DMR FP ADD, 9 = TMR FP ADD, 10 = DMR Posit MUL, 11 = TMR Posit MUL
  task automatic stream(input int unit, input int n);
    logic [31:0] x, z, r, got;
    int lat;
    for (int i = 0; i < n; i++) begin
      if (unit == 3 || unit == 4 || unit == 6 || unit == 7 || unit == 10 || unit == 11) begin
        x = real_to_posit(rand_in_range(pick_range(i)));
        z = real_to_posit(rand_in_range(pick_range(i)));
        if (unit != 4 && unit < 10) r = real_to_posit(posit_to_real(x) + posit_to_real(z));
        else           r = real_to_posit(posit_to_real(x) * posit_to_real(z));
      end else begin
        x = fp_from_real(rand_in_range(pick_range(i)));
        z = fp_from_real(rand_in_range(pick_range(i)));
        r = (unit == 5 || unit == 8 || unit == 9) ? fp_add_ref(x, z) : fp_mul_ref(x, z);
      end
      @(negedge clk);
      case (unit)
        0: begin fm_a = x; fm_b = z; fm_iv = 1; end
        1: begin fd_a = x; fd_b = z; fd_iv = 1; end
        2: begin ft_a = x; ft_b = z; ft_iv = 1; end
        3: begin pa_a = x; pa_b = z; pa_iv = 1; end
        4: begin pm_a = x; pm_b = z; pm_iv = 1; end
        5: begin fa_a = x; fa_b = z; fa_iv = 1; end
        6: begin pd_a = x; pd_b = z; pd_iv = 1; end
        7: begin pt_a = x; pt_b = z; pt_iv = 1; end
        8: begin ad_a = x; ad_b = z; ad_iv = 1; end
        9: begin at_a = x; at_b = z; at_iv = 1; end
        10: begin md_a = x; md_b = z; md_iv = 1; end
        default: begin mt_a = x; mt_b = z; mt_iv = 1; end
      endcase
      @(posedge clk);
      #1;
      case (unit)
        0: fm_iv = 0;
        1: fd_iv = 0;
        2: ft_iv = 0;
        3: pa_iv = 0;
        4: pm_iv = 0;
        5: fa_iv = 0;
        6: pd_iv = 0;
        7: pt_iv = 0;
        8: ad_iv = 0;
        9: at_iv = 0;
        10: md_iv = 0;
        default: mt_iv = 0;
      endcase
      lat = 0;
      do begin
        @(posedge clk);
        #1 lat++;
      end while (!(unit == 0 ? fm_ov : unit == 1 ? fd_ov : unit == 2 ? ft_ov : unit == 3 ? pa_ov : unit == 4 ? pm_ov :
                 unit == 5 ? fa_ov : unit == 6 ? pd_ov : unit == 7 ? pt_ov :
                 unit == 8 ? ad_ov : unit == 9 ? at_ov : unit == 10 ? md_ov : mt_ov) && lat < 10);
      got = (unit == 0) ? fm_y : (unit == 1) ? fd_y : (unit == 2) ? ft_y : (unit == 3) ? pa_y : (unit == 4) ? pm_y : (unit == 5) ? fa_y : (unit == 6) ? pd_y : (unit == 7) ? pt_y :
            (unit == 8) ? ad_y : (unit == 9) ? at_y : (unit == 10) ? md_y : mt_y;
      n_ops++;
      checks++;
      if (got !== r && !(allow_wrong && unit == 0)) begin
        failures++;
        if (failures < 10) $display("unit %0d: %h op %h = %h, expected %h", unit, x, z, got, r);
      end
      checks++;
      if (lat != 1 && lat != 2 && lat != 3) begin failures++; $display("unit %0d latency %0d", unit, lat); end
    end
  endtask

  task automatic all_units(input int n);
    fork
      stream(0, n);
      stream(1, n);
      stream(2, n);
      stream(3, n);
      stream(4, n);
      stream(5, n);
      stream(6, n);
      stream(7, n);
      stream(8, n);
      stream(9, n);
      stream(10, n);
      stream(11, n);
    join
  endtask

  initial begin
    {fm_iv, fd_iv, ft_iv, pa_iv, pm_iv, fa_iv, pd_iv, pt_iv, ad_iv, at_iv, md_iv, mt_iv} = '0;
    {fm_a, fm_b, fd_a, fd_b, ft_a, ft_b, pa_a, pa_b, pm_a, pm_b, fa_a, fa_b, pd_a, pd_b, pt_a, pt_b, ad_a, ad_b, at_a, at_b, md_a, md_b, mt_a, mt_b} = '0;
    {fm_fi, fd_fi, ft_fi, pa_fi, pm_fi, fa_fi, pd_fi, pt_fi, ad_fi, at_fi, md_fi, mt_fi} = {12{FI_NONE}};
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // phase 1
    all_units(200);
    checks++;
    if (fm_det || pa_det || pm_det || fa_det || pd_sw || n_pt_mask != 0 || ad_sw || n_at_mask != 0 || md_sw || n_mt_mask != 0 || fd_sw || n_tmr_mask != 0) failures++;

    // phase 2
    fm_fi = '{en: 1'b1, tgt: FT_CLA,   slot: 2'd0, idx: 4'd7, val: 1'b0};
    fd_fi = '{en: 1'b1, tgt: FT_CLA,   slot: 2'd0, idx: 4'd7, val: 1'b0};
    ft_fi = '{en: 1'b1, tgt: FT_SPARE, slot: 2'd0, idx: 4'd7, val: 1'b0};
    pa_fi = '{en: 1'b1, tgt: FT_CLA,   slot: 2'd0, idx: 4'd4, val: 1'b1};
    pm_fi = '{en: 1'b1, tgt: FT_CLA,   slot: 2'd0, idx: 4'd4, val: 1'b1};
    fa_fi = '{en: 1'b1, tgt: FT_CLA,   slot: 2'd0, idx: 4'd4, val: 1'b1};
    pd_fi = '{en: 1'b1, tgt: FT_CLA,   slot: 2'd0, idx: 4'd4, val: 1'b1};
    pt_fi = '{en: 1'b1, tgt: FT_PRED,  slot: 2'd1, idx: 4'd1, val: 1'b1};
    ad_fi = '{en: 1'b1, tgt: FT_CLA,   slot: 2'd0, idx: 4'd4, val: 1'b1};
    at_fi = '{en: 1'b1, tgt: FT_SPARE, slot: 2'd2, idx: 4'd1, val: 1'b1};
    md_fi = '{en: 1'b1, tgt: FT_CLA,   slot: 2'd0, idx: 4'd4, val: 1'b1};
    mt_fi = '{en: 1'b1, tgt: FT_CLA,   slot: 2'd1, idx: 4'd1, val: 1'b1};
    all_units(200);

    // phase 3
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fm_fi = '{en: 1'b1, tgt: FT_PRED, slot: 2'd2, idx: 4'd9, val: 1'b1};
    pa_fi = '{en: 1'b1, tgt: FT_PRED, slot: 2'd2, idx: 4'd9, val: 1'b0};
    pm_fi = '{en: 1'b1, tgt: FT_PRED, slot: 2'd1, idx: 4'd1, val: 1'b1};
    fa_fi = '{en: 1'b1, tgt: FT_PRED, slot: 2'd2, idx: 4'd1, val: 1'b0};
    fd_fi = FI_NONE;
    ft_fi = FI_NONE;
    pd_fi = FI_NONE;
    pt_fi = FI_NONE;
    {ad_fi, at_fi, md_fi, mt_fi} = {4{FI_NONE}};
    all_units(150);
    // the spare of the FP unit is now in use: a second faulty CLA cannot be repaired
    allow_wrong = 1;
    fm_fi = '{en: 1'b1, tgt: FT_CLA, slot: 2'd0, idx: 4'd7, val: 1'b0};
    stream(0, 50);

    $display("ops=%0d S-CR repair fp=%0d posit add=%0d posit mul=%0d fp add=%0d, predictor diagnosis fp=%0d posit add=%0d posit mul=%0d fp add=%0d, alarm=%0d", n_ops, n_fm_repair, n_pa_repair, n_pm_repair, n_fa_repair, n_fm_pred, n_pa_pred, n_pm_pred, n_fa_pred, n_alarm);
    $display("DMR switch fp mul=%0d posit add=%0d fp add=%0d posit mul=%0d, TMR masked cycles fp mul=%0d posit add=%0d fp add=%0d posit mul=%0d",
             n_dmr_switch, n_pd_switch, n_ad_switch, n_md_switch, n_tmr_mask, n_pt_mask, n_at_mask, n_mt_mask);
    checks += 17;
    if (n_ad_switch < 1) failures++;
    if (n_at_mask < 1)   failures++;
    if (n_md_switch < 1) failures++;
    if (n_mt_mask < 1)   failures++;
    if (n_pd_switch < 1) failures++;
    if (n_pt_mask < 1)   failures++;
    if (n_fa_repair < 1) failures++;
    if (n_fa_pred < 1)   failures++;
    if (n_pm_repair < 1) failures++;
    if (n_pm_pred < 1)   failures++;
    if (n_fm_repair < 1) failures++;
    if (n_pa_repair < 1) failures++;
    if (n_fm_pred < 1)   failures++;
    if (n_pa_pred < 1)   failures++;
    if (n_alarm < 1)     failures++;
    if (n_dmr_switch < 1) failures++;
    if (n_tmr_mask < 1)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
