// tb_posit_mul_scr: the hardened Posit(32,2) multiplier.
// Products are checked against a reference that decodes both posits to real,
// multiplies and rounds to the nearest posit (ties to the even code), in the
// +-1, +-10 and +-100 operand ranges, on random bit patterns whose product
// lies within 2^-100..2^100, and on directed cases (zero, NaR, saturation at
// maxpos and minpos, exact powers of two). Fault-free results must come one
// clock edge after acceptance. A stuck-at in the slot-0 scale CLA must be
// detected once, cost exactly two extra cycles and be repaired by the spare;
// a stuck-at in a carry predictor must be diagnosed as such. Every result
// must stay exact throughout.
module tb_posit_mul_scr;
  import fpp_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n;
  logic in_valid, in_ready, out_valid, detect;
  logic [31:0] a, b, y;
  fi_t fi;
  scr_status_t st;
  int checks = 0, failures = 0;
  int n_detect = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (detect) n_detect++;

  posit_mul_scr dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .a(a), .b(b),
    .fi(fi), .out_valid(out_valid), .y(y), .detect(detect), .status(st));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_mul(input logic [31:0] x, input logic [31:0] z);
    if (x == 32'h8000_0000 || z == 32'h8000_0000) return 32'h8000_0000;
    return real_to_posit(posit_to_real(x) * posit_to_real(z));
  endfunction

  // one multiplication; returns the clock edges from acceptance to out_valid
  task automatic mul_op(input logic [31:0] x, input logic [31:0] z, output int lat);
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    a = x; b = z; in_valid = 1'b1;
    @(posedge clk);
    #1 in_valid = 1'b0;
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
      #1;
    end while (!out_valid && lat < 20);
    checks++;
    if (y !== ref_mul(x, z)) begin
      failures++;
      if (failures < 10) $display("%h * %h = %h, expected %h", x, z, y, ref_mul(x, z));
    end
  endtask

  task automatic reset_dut();
    in_valid = 1'b0; rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  // n operations in the +-1, +-10, +-100 ranges; counts each latency seen
  task automatic run(input int n, output int n_norm, output int n_slow);
    real ranges[3] = '{1.0, 10.0, 100.0};
    int lat;
    n_norm = 0; n_slow = 0;
    for (int i = 0; i < n; i++) begin
      mul_op(real_to_posit(rand_in_range(ranges[i % 3])), real_to_posit(rand_in_range(ranges[i % 3])), lat);
      checks++;
      if (lat == 1) n_norm++;
      else if (lat == 3) n_slow++;
      else begin failures++; $display("latency %0d", lat); end
    end
  endtask

  initial begin
    int nn, ns, lat, nrand;
    logic [31:0] x, z;
    real v;
    fi = FI_NONE;
    a = '0; b = '0;
    reset_dut();
    // directed cases: one, sign, zero, NaR, saturation, powers of two
    mul_op(32'h4000_0000, 32'h4000_0000, lat);   // 1 * 1
    mul_op(32'hC000_0000, 32'h4800_0000, lat);   // -1 * 2
    mul_op(32'h0000_0000, 32'h5555_5555, lat);   // 0 * x
    mul_op(32'h8000_0000, 32'h0000_0000, lat);   // NaR * 0
    mul_op(32'h7FFF_FFFF, 32'h7FFF_FFFF, lat);   // maxpos^2 saturates
    mul_op(32'h0000_0001, 32'h0000_0001, lat);   // minpos^2 saturates
    mul_op(32'h7FFF_FFFF, 32'h0000_0001, lat);   // maxpos * minpos = 1
    mul_op(32'h3000_0000, 32'h5000_0000, lat);   // 0.25 * 4
    mul_op(32'h4400_0000, 32'h4400_0000, lat);   // 1.5 * 1.5 = 2.25
    // random bit patterns with products inside the reference's exact range
    nrand = 0;
    while (nrand < 300) begin
      x = $urandom; z = $urandom;
      if (x == 32'h8000_0000 || z == 32'h8000_0000 || x == 0 || z == 0) continue;
      v = posit_to_real(x) * posit_to_real(z);
      if (v < 0.0) v = -v;
      if (v < pow2(-100) || v > pow2(100)) continue;
      mul_op(x, z, lat);
      nrand++;
    end
    run(300, nn, ns);
    checks++;
    if (nn != 300 || n_detect != 0) begin failures++; $display("clean: %0d %0d", nn, n_detect); end

    // stuck-at-1 on carry 4 of the sa + sb adder
    fi = '{en: 1'b1, tgt: FT_CLA, slot: 2'd0, idx: 4'd4, val: 1'b1};
    run(300, nn, ns);
    checks++;
    if (ns != 1 || !st.spare_used || st.spare_slot != 2'd0 || st.alarm) begin
      failures++; $display("cla fault: slow=%0d status=%p", ns, st);
    end
    // stuck-at-1 on carry 1 of the predictor of the normalization adder
    reset_dut();
    fi = '{en: 1'b1, tgt: FT_PRED, slot: 2'd1, idx: 4'd1, val: 1'b1};
    run(300, nn, ns);
    checks++;
    if (ns != 1 || !st.pred_fault || st.alarm) begin
      failures++; $display("pred fault: slow=%0d status=%p", ns, st);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
