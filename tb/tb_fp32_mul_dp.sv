// tb_fp32_mul_dp: the FP32 multiplier datapath, closed with three plain CLAs
// and one pack stage, against a double-precision reference: random bit
// patterns (NaN, infinity, subnormal, overflow and underflow included),
// operands in the +-1, +-10 and +-100 ranges and special cases.
module tb_fp32_mul_dp;
  import fpp_pkg::*;
  import tb_ref_pkg::*;
  logic [31:0] a, b, y, r;
  logic [2:0][XW-1:0] add_a, add_b, add_s;
  logic [2:0] add_cin;
  fp_pack_t pk;
  int checks = 0, failures = 0;

  fp32_mul_dp dut (.a(a), .b(b), .add_a(add_a), .add_b(add_b), .add_cin(add_cin), .add_s(add_s), .pk(pk));
  fp32_mul_pack u_pack (.pk(pk), .y(y));
  for (genvar k = 0; k < 3; k++) begin : g_add
    logic [XW:0] c;
    cla_adder #(.W(XW)) u_add (.a(add_a[k]), .b(add_b[k]), .cin(add_cin[k]), .fi('0), .s(add_s[k]), .c(c));
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check1();
    #1;
    r = fp_mul_ref(a, b);
    checks++;
    if (y !== r) begin
      failures++;
      if (failures < 10) $display("%h * %h = %h, expected %h", a, b, y, r);
    end
  endtask

  initial begin
    real ranges[3] = '{1.0, 10.0, 100.0};
    // special cases
    a = 32'h3F80_0000; b = 32'h3F80_0000; check1();          // 1*1
    a = 32'h7F80_0000; b = 32'h0000_0000; check1();          // inf*0
    a = 32'h7FC0_0001; b = 32'h3F80_0000; check1();          // NaN
    a = 32'hFF80_0000; b = 32'h4000_0000; check1();          // -inf*2
    a = 32'h7F7F_FFFF; b = 32'h4000_0000; check1();          // overflow
    a = 32'h0080_0000; b = 32'h3F00_0000; check1();          // underflow
    a = 32'h3FFF_FFFF; b = 32'h3FFF_FFFF; check1();          // rounding carry
    a = 32'h3F80_0003; b = 32'h3FC0_0000; check1();          // tie, rounds to even (down)
    for (int n = 0; n < 5000; n++) begin   // 13 significant bits each: frequent ties
      a = {2'b00, 6'($urandom), 12'($urandom), 11'd0} + 32'h3800_0000;
      b = {2'b01, 6'($urandom), 12'($urandom), 11'd0} - 32'h0800_0000;
      check1();
    end
    for (int n = 0; n < 20000; n++) begin
      a = $urandom; b = $urandom; check1();
    end
    for (int n = 0; n < 20000; n++) begin
      a = fp_from_real(rand_in_range(ranges[n % 3]));
      b = fp_from_real(rand_in_range(ranges[n % 3]));
      check1();
    end
    for (int n = 0; n < 5000; n++) begin   // exponents near the limits
      a = {1'($urandom), 8'(8'd1 + 8'($urandom % 8) + ((n % 2 != 0) ? 8'd0 : 8'd240)), 23'($urandom)};
      b = {1'($urandom), 8'(8'd120 + 8'($urandom % 16)), 23'($urandom)};
      check1();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
