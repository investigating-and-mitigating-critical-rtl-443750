// tb_fp32_mul_scr: the S-CR hardened FP32 multiplier. Fault-free
// operations must be exact, out_valid one clock edge after acceptance. A stuck-at in the
// slot-0 exponent CLA must be detected once, cost exactly two extra cycles
// and be repaired by the spare and leave every result exact; a
// stuck-at in a carry predictor must be diagnosed as such without a wrong
// result.
module tb_fp32_mul_scr;
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

  fp32_mul_scr dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .a(a), .b(b),
    .fi(fi), .out_valid(out_valid), .y(y), .detect(detect), .status(st));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one multiplication; returns the clock edges from acceptance to out_valid
  task automatic mul(input logic [31:0] x, input logic [31:0] z, output int lat);
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
    if (y !== fp_mul_ref(x, z)) begin
      failures++;
      if (failures < 10) $display("%h * %h = %h, expected %h", x, z, y, fp_mul_ref(x, z));
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
      mul(fp_from_real(rand_in_range(ranges[i % 3])), fp_from_real(rand_in_range(ranges[i % 3])), lat);
      checks++;
      if (lat == 1) n_norm++;
      else if (lat == 3) n_slow++;
      else begin failures++; $display("latency %0d", lat); end
    end
  endtask

  initial begin
    int nn, ns;
    fi = FI_NONE;
    a = '0; b = '0;
    reset_dut();
    run(300, nn, ns);
    checks++;
    if (nn != 300 || n_detect != 0) begin failures++; $display("clean: %0d %0d", nn, n_detect); end

    // stuck-at-0 on carry 7 of the ea+eb adder: active for most operands
    fi = '{en: 1'b1, tgt: FT_CLA, slot: 2'd0, idx: 4'd7, val: 1'b0};
    run(300, nn, ns);
    checks++;
    if (ns != 1 || !st.spare_used || st.spare_slot != 2'd0 || st.alarm) begin
      failures++; $display("cla fault: slow=%0d status=%p", ns, st);
    end
    // stuck-at-1 on carry 9 of the normalization adder's predictor
    reset_dut();
    fi = '{en: 1'b1, tgt: FT_PRED, slot: 2'd2, idx: 4'd9, val: 1'b1};
    run(300, nn, ns);
    checks++;
    if (ns != 1 || !st.pred_fault || st.alarm) begin
      failures++; $display("pred fault: slow=%0d status=%p", ns, st);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
