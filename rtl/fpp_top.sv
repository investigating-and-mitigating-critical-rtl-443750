// fpp_top: the hardened arithmetic cores side by side.
//
// Twelve independent units share only clock and reset:
//   fm_*  FP32 multiplier with Self-Check and Repair on the exponent path
//   fd_*  FP32 multiplier with Dual Modular Redundancy on the exponent path
//   ft_*  FP32 multiplier with Triple Modular Redundancy on the exponent path
//   pa_*  Posit(32,2) adder with Self-Check and Repair on the scale path,
//         redundant CLZ multiplexers and a triplicated encoder
//   pm_*  Posit(32,2) multiplier, hardened the same way as the adder
//   fa_*  FP32 adder with Self-Check and Repair on the exponent path
//   pd_*  Posit(32,2) adder with Dual Modular Redundancy
//   pt_*  Posit(32,2) adder with Triple Modular Redundancy
//   ad_*, at_*  FP32 adder with DMR and with TMR
//   md_*, mt_*  Posit(32,2) multiplier with DMR and with TMR
// Each has its own valid/ready handshake (see fp32_mul_scr), operands,
// result, a detect pulse and a fault-injection input (fpp_pkg::fi_t) that
// places one stuck-at fault for test. No timing is added by the top.
module fpp_top
  import fpp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // FP32 MUL, S-CR
  input  logic        fm_in_valid,
  output logic        fm_in_ready,
  input  logic [31:0] fm_a,
  input  logic [31:0] fm_b,
  input  fi_t         fm_fi,
  output logic        fm_out_valid,
  output logic [31:0] fm_y,
  output logic        fm_detect,
  output scr_status_t fm_status,
  // FP32 MUL, DMR
  input  logic        fd_in_valid,
  output logic        fd_in_ready,
  input  logic [31:0] fd_a,
  input  logic [31:0] fd_b,
  input  fi_t         fd_fi,
  output logic        fd_out_valid,
  output logic [31:0] fd_y,
  output logic        fd_detect,
  output logic        fd_switched,
  // FP32 MUL, TMR
  input  logic        ft_in_valid,
  output logic        ft_in_ready,
  input  logic [31:0] ft_a,
  input  logic [31:0] ft_b,
  input  fi_t         ft_fi,
  output logic        ft_out_valid,
  output logic [31:0] ft_y,
  output logic        ft_detect,
  // Posit(32,2) ADD, S-CR
  input  logic        pa_in_valid,
  output logic        pa_in_ready,
  input  logic [31:0] pa_a,
  input  logic [31:0] pa_b,
  input  fi_t         pa_fi,
  output logic        pa_out_valid,
  output logic [31:0] pa_y,
  output logic        pa_detect,
  output scr_status_t pa_status,
  // Posit(32,2) MUL, S-CR
  input  logic        pm_in_valid,
  output logic        pm_in_ready,
  input  logic [31:0] pm_a,
  input  logic [31:0] pm_b,
  input  fi_t         pm_fi,
  output logic        pm_out_valid,
  output logic [31:0] pm_y,
  output logic        pm_detect,
  output scr_status_t pm_status,
  // FP32 ADD, S-CR
  input  logic        fa_in_valid,
  output logic        fa_in_ready,
  input  logic [31:0] fa_a,
  input  logic [31:0] fa_b,
  input  fi_t         fa_fi,
  output logic        fa_out_valid,
  output logic [31:0] fa_y,
  output logic        fa_detect,
  output scr_status_t fa_status,
  // Posit(32,2) ADD, DMR
  input  logic        pd_in_valid,
  output logic        pd_in_ready,
  input  logic [31:0] pd_a,
  input  logic [31:0] pd_b,
  input  fi_t         pd_fi,
  output logic        pd_out_valid,
  output logic [31:0] pd_y,
  output logic        pd_detect,
  output logic        pd_switched,
  // Posit(32,2) ADD, TMR
  input  logic        pt_in_valid,
  output logic        pt_in_ready,
  input  logic [31:0] pt_a,
  input  logic [31:0] pt_b,
  input  fi_t         pt_fi,
  output logic        pt_out_valid,
  output logic [31:0] pt_y,
  output logic        pt_detect,
  // FP32 ADD, DMR
  input  logic        ad_in_valid,
  output logic        ad_in_ready,
  input  logic [31:0] ad_a,
  input  logic [31:0] ad_b,
  input  fi_t         ad_fi,
  output logic        ad_out_valid,
  output logic [31:0] ad_y,
  output logic        ad_detect,
  output logic        ad_switched,
  // FP32 ADD, TMR
  input  logic        at_in_valid,
  output logic        at_in_ready,
  input  logic [31:0] at_a,
  input  logic [31:0] at_b,
  input  fi_t         at_fi,
  output logic        at_out_valid,
  output logic [31:0] at_y,
  output logic        at_detect,
  // Posit(32,2) MUL, DMR
  input  logic        md_in_valid,
  output logic        md_in_ready,
  input  logic [31:0] md_a,
  input  logic [31:0] md_b,
  input  fi_t         md_fi,
  output logic        md_out_valid,
  output logic [31:0] md_y,
  output logic        md_detect,
  output logic        md_switched,
  // Posit(32,2) MUL, TMR
  input  logic        mt_in_valid,
  output logic        mt_in_ready,
  input  logic [31:0] mt_a,
  input  logic [31:0] mt_b,
  input  fi_t         mt_fi,
  output logic        mt_out_valid,
  output logic [31:0] mt_y,
  output logic        mt_detect
);

  fp32_mul_scr u_fm (.clk(clk), .rst_n(rst_n), .in_valid(fm_in_valid), .in_ready(fm_in_ready),
                     .a(fm_a), .b(fm_b), .fi(fm_fi), .out_valid(fm_out_valid), .y(fm_y),
                     .detect(fm_detect), .status(fm_status));

  fp32_mul_dmr u_fd (.clk(clk), .rst_n(rst_n), .in_valid(fd_in_valid), .in_ready(fd_in_ready),
                     .a(fd_a), .b(fd_b), .fi(fd_fi), .out_valid(fd_out_valid), .y(fd_y),
                     .detect(fd_detect), .switched(fd_switched));

  fp32_mul_tmr u_ft (.clk(clk), .rst_n(rst_n), .in_valid(ft_in_valid), .in_ready(ft_in_ready),
                     .a(ft_a), .b(ft_b), .fi(ft_fi), .out_valid(ft_out_valid), .y(ft_y),
                     .detect(ft_detect));

  posit_add_scr u_pa (.clk(clk), .rst_n(rst_n), .in_valid(pa_in_valid), .in_ready(pa_in_ready),
                      .a(pa_a), .b(pa_b), .fi(pa_fi), .out_valid(pa_out_valid), .y(pa_y),
                      .detect(pa_detect), .status(pa_status));

  posit_mul_scr u_pm (.clk(clk), .rst_n(rst_n), .in_valid(pm_in_valid), .in_ready(pm_in_ready),
                      .a(pm_a), .b(pm_b), .fi(pm_fi), .out_valid(pm_out_valid), .y(pm_y),
                      .detect(pm_detect), .status(pm_status));

  fp32_add_scr u_fa (.clk(clk), .rst_n(rst_n), .in_valid(fa_in_valid), .in_ready(fa_in_ready),
                     .a(fa_a), .b(fa_b), .fi(fa_fi), .out_valid(fa_out_valid), .y(fa_y),
                     .detect(fa_detect), .status(fa_status));

  posit_add_dmr u_pd (.clk(clk), .rst_n(rst_n), .in_valid(pd_in_valid), .in_ready(pd_in_ready),
                      .a(pd_a), .b(pd_b), .fi(pd_fi), .out_valid(pd_out_valid), .y(pd_y),
                      .detect(pd_detect), .switched(pd_switched));

  posit_add_tmr u_pt (.clk(clk), .rst_n(rst_n), .in_valid(pt_in_valid), .in_ready(pt_in_ready),
                      .a(pt_a), .b(pt_b), .fi(pt_fi), .out_valid(pt_out_valid), .y(pt_y),
                      .detect(pt_detect));

  fp32_add_dmr u_ad (.clk(clk), .rst_n(rst_n), .in_valid(ad_in_valid), .in_ready(ad_in_ready),
                     .a(ad_a), .b(ad_b), .fi(ad_fi), .out_valid(ad_out_valid), .y(ad_y),
                     .detect(ad_detect), .switched(ad_switched));

  fp32_add_tmr u_at (.clk(clk), .rst_n(rst_n), .in_valid(at_in_valid), .in_ready(at_in_ready),
                     .a(at_a), .b(at_b), .fi(at_fi), .out_valid(at_out_valid), .y(at_y),
                     .detect(at_detect));

  posit_mul_dmr u_md (.clk(clk), .rst_n(rst_n), .in_valid(md_in_valid), .in_ready(md_in_ready),
                     .a(md_a), .b(md_b), .fi(md_fi), .out_valid(md_out_valid), .y(md_y),
                     .detect(md_detect), .switched(md_switched));

  posit_mul_tmr u_mt (.clk(clk), .rst_n(rst_n), .in_valid(mt_in_valid), .in_ready(mt_in_ready),
                     .a(mt_a), .b(mt_b), .fi(mt_fi), .out_valid(mt_out_valid), .y(mt_y),
                     .detect(mt_detect));

endmodule
