// tb_fp32_add_scr: the IEEE-754 single adder hardened with Self-Check and
// Repair.
// Sums are checked against tb_ref_pkg::fp_add_ref. Stimuli: directed cases (signed zeros, infinities, NaN,
// overflow, underflow to zero, rounding ties, cancellation), random bit
// patterns over the whole exponent range and the +-1, +-10, +-100 operand
// ranges. Fault-free results must come one clock edge after acceptance. A
// stuck-at in the slot-0 exponent CLA must be detected once, cost exactly
// two extra cycles and be repaired by the spare; a stuck-at in a carry
// predictor must be diagnosed as such. Every result must stay exact.
module tb_fp32_add_scr;
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

  fp32_add_scr dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .a(a), .b(b),
    .fi(fi), .out_valid(out_valid), .y(y), .detect(detect), .status(st));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_add(input logic [31:0] x, input logic [31:0] z);
    return fp_add_ref(x, z);
  endfunction

  // one addition; returns the clock edges from acceptance to out_valid
  task automatic add_op(input logic [31:0] x, input logic [31:0] z, output int lat);
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
    if (y !== ref_add(x, z)) begin
      failures++;
      if (failures < 10) $display("%h + %h = %h, expected %h", x, z, y, ref_add(x, z));
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
      add_op(fp_from_real(rand_in_range(ranges[i % 3])), fp_from_real(rand_in_range(ranges[i % 3])), lat);
      checks++;
      if (lat == 1) n_norm++;
      else if (lat == 3) n_slow++;
      else begin failures++; $display("latency %0d", lat); end
    end
  endtask

  initial begin
    int nn, ns, lat;
    logic [31:0] x, z;
    fi = FI_NONE;
    a = '0; b = '0;
    reset_dut();
    add_op(32'h3F80_0000, 32'h3F80_0000, lat);   // 1 + 1
    add_op(32'h3F80_0000, 32'hBF80_0000, lat);   // 1 - 1 = +0
    add_op(32'h8000_0000, 32'h8000_0000, lat);   // -0 + -0 = -0
    add_op(32'h8000_0000, 32'h0000_0000, lat);   // -0 + +0 = +0
    add_op(32'h7F80_0000, 32'hFF80_0000, lat);   // inf - inf = NaN
    add_op(32'h7F80_0000, 32'h3F80_0000, lat);   // inf + 1
    add_op(32'hFF80_0000, 32'hFF80_0000, lat);   // -inf + -inf
    add_op(32'h7FC0_1234, 32'h3F80_0000, lat);   // NaN + 1
    add_op(32'h7F7F_FFFF, 32'h7F7F_FFFF, lat);   // overflow to inf
    add_op(32'h00C0_0000, 32'h8080_0000, lat);   // 1.5*2^-126 - 2^-126 flushes to zero
    add_op(32'h0040_0000, 32'h3F80_0000, lat);   // subnormal input counts as zero
    add_op(32'h3F80_0000, 32'h3380_0000, lat);   // 1 + 2^-24: tie, stays 1
    add_op(32'h3F80_0001, 32'h3380_0000, lat);   // tie, rounds up to even
    add_op(32'h3F80_0000, 32'h3440_0000, lat);   // 1 + 3*2^-24 rounds up
    add_op(32'h3F7F_FFFF, 32'h3380_0000, lat);   // rounding carries into the exponent
    add_op(32'h3F80_0001, 32'hBF80_0000, lat);   // cancellation to 2^-23
    add_op(32'h4B80_0000, 32'hB380_0000, lat);   // large exponent difference, subtract
    // random bit patterns over all exponents, and with close exponents
    for (int i = 0; i < 600; i++) begin
      x = $urandom; z = $urandom;
      if (i % 2 == 1) z[30:23] = x[30:23] + 8'($urandom_range(0, 4)) - 8'd2;
      add_op(x, z, lat);
    end
    run(300, nn, ns);
    checks++;
    if (nn != 300 || n_detect != 0) begin failures++; $display("clean: %0d %0d", nn, n_detect); end

    // stuck-at-1 on carry 4 of the ea - eb subtractor
    fi = '{en: 1'b1, tgt: FT_CLA, slot: 2'd0, idx: 4'd4, val: 1'b1};
    run(300, nn, ns);
    checks++;
    if (ns != 1 || !st.spare_used || st.spare_slot != 2'd0 || st.alarm) begin
      failures++; $display("cla fault: slow=%0d status=%p", ns, st);
    end
    // stuck-at-0 on carry 1 of the predictor of the final exponent adder
    reset_dut();
    fi = '{en: 1'b1, tgt: FT_PRED, slot: 2'd2, idx: 4'd1, val: 1'b0};
    run(300, nn, ns);
    checks++;
    if (ns != 1 || !st.pred_fault || st.alarm) begin
      failures++; $display("pred fault: slow=%0d status=%p", ns, st);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
