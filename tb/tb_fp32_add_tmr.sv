// tb_fp32_add_tmr: the TMR hardened IEEE-754 single adder. Sums are
// checked against tb_ref_pkg::fp_add_ref. Every result must
// come one clock edge after acceptance, with or without a fault. A stuck-at
// in any one copy of an exponent adder must be reported by detect and masked by
// the voters, leaving every result exact.
module tb_fp32_add_tmr;
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

  fp32_add_tmr dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .a(a), .b(b),
    .fi(fi), .out_valid(out_valid), .y(y), .detect(detect));

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

    // one fault in each copy of each slot in turn: masked, reported, no extra cycle
    for (int k = 0; k < 3; k++) begin
      for (int r = 0; r < 3; r++) begin
        n_detect = 0;
        fi = '{en: 1'b1, tgt: ftgt_e'(r), slot: 2'(k), idx: 4'd1, val: 1'b1};
        run(60, nn, ns);
        checks++;
        if (nn != 60 || n_detect == 0) begin failures++; $display("tmr slot %0d copy %0d: %0d %0d", k, r, nn, n_detect); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
