// tb_fp32_mul_tmr: the TMR hardened FP32 multiplier. Every
// operation must be exact and show out_valid one edge after acceptance, with or without a
// stuck-at in any one copy of any exponent adder; the voters must report the
// disagreement.
module tb_fp32_mul_tmr;
  import fpp_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n;
  logic in_valid, in_ready, out_valid, detect;
  logic [31:0] a, b, y;
  fi_t fi;

  int checks = 0, failures = 0;
  int n_detect = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (detect) n_detect++;

  fp32_mul_tmr dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .a(a), .b(b),
    .fi(fi), .out_valid(out_valid), .y(y), .detect(detect));

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
      else if (lat == 99) n_slow++;
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

    for (int t = 0; t < 3; t++) begin
      for (int k = 0; k < 3; k++) begin
        int n0;
        n0 = n_detect;
        fi = '{en: 1'b1, tgt: ftgt_e'(t), slot: 2'(k), idx: 4'(3 + k + t), val: 1'($urandom)};
        run(100, nn, ns);
        checks++;
        if (nn != 100 || n_detect == n0) begin
          failures++; $display("tmr copy %0d slot %0d: normal=%0d detects=%0d", t, k, nn, n_detect - n0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
