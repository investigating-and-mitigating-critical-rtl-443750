// tb_posit_mul_dmr: the DMR hardened Posit(32,2) multiplier. Products are checked
// against the value-rounding posit reference of tb_ref_pkg. Fault-free
// operations must be exact, out_valid one clock edge after acceptance. A
// stuck-at in the working copy of a scale adder must be detected once, cost
// one extra cycle, switch the core to the redundant copy and leave every
// result exact.
module tb_posit_mul_dmr;
  import fpp_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n;
  logic in_valid, in_ready, out_valid, detect;
  logic [31:0] a, b, y;
  fi_t fi;
  logic switched;
  int checks = 0, failures = 0;
  int n_detect = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (detect) n_detect++;

  posit_mul_dmr dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .a(a), .b(b),
    .fi(fi), .out_valid(out_valid), .y(y), .detect(detect), .switched(switched));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_add(input logic [31:0] x, input logic [31:0] z);
    return real_to_posit(posit_to_real(x) * posit_to_real(z));
  endfunction

  // one multiplication; returns the clock edges from acceptance to out_valid
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
      if (failures < 10) $display("%h * %h = %h, expected %h", x, z, y, ref_add(x, z));
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
      add_op(real_to_posit(rand_in_range(ranges[i % 3])), real_to_posit(rand_in_range(ranges[i % 3])), lat);
      checks++;
      if (lat == 1) n_norm++;
      else if (lat == 2) n_slow++;
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

    // stuck-at-1 on carry 4 of the sa + sb adder, working copy
    fi = '{en: 1'b1, tgt: FT_CLA, slot: 2'd0, idx: 4'd4, val: 1'b1};
    run(300, nn, ns);
    checks++;
    if (ns != 1 || !switched) begin failures++; $display("dmr: slow=%0d switched=%b", ns, switched); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
