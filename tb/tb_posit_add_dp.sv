// tb_posit_add_dp: the Posit(32,2) adder datapath, closed with three plain
// CLAs and the encoder, against an independent reference (exact sum in double
// precision, rounded to the nearest posit by a search over the ordered
// codes). Operands come from the +-1, +-10 and +-100 ranges, plus random
// codes of every scale with exactly representable sums, cancellations, zero
// and NaR.
module tb_posit_add_dp;
  import fpp_pkg::*;
  import tb_ref_pkg::*;
  logic [31:0] a, b, y, r;
  logic [2:0][XW-1:0] add_a, add_b, add_s;
  logic [2:0] add_cin;
  ps_enc_t enc;
  int checks = 0, failures = 0;

  posit_add_dp #(.HARDEN(1'b0)) dut (.a(a), .b(b), .add_a(add_a), .add_b(add_b), .add_cin(add_cin),
                                     .add_s(add_s), .enc(enc));
  posit_encode u_enc (.enc(enc), .p(y));
  for (genvar k = 0; k < 3; k++) begin : g_add
    logic [XW:0] c;
    cla_adder #(.W(XW)) u_add (.a(add_a[k]), .b(add_b[k]), .cin(add_cin[k]), .fi('0), .s(add_s[k]), .c(c));
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check1();
    #1;
    if (a == 32'h8000_0000 || b == 32'h8000_0000) r = 32'h8000_0000;
    else r = real_to_posit(posit_to_real(a) + posit_to_real(b));
    // where the regime leaves no room for both exponent bits (|scale| > 100)
    // the encoder rounds the bit string, not the value: not compared there
    if (r != 0 && r != 32'h8000_0000 && (posit_to_real(r) > pow2(100) || posit_to_real(r) < -pow2(100) ||
        (posit_to_real(r) < pow2(-100) && posit_to_real(r) > -pow2(-100)))) return;
    checks++;
    if (y !== r) begin
      failures++;
      if (failures < 10) $display("%h + %h = %h, expected %h", a, b, y, r);
    end
  endtask

  initial begin
    real ranges[3] = '{1.0, 10.0, 100.0};
    a = 32'h4000_0000; b = 32'h4000_0000; check1();     // 1 + 1
    a = 32'h4000_0000; b = 32'hC000_0000; check1();     // 1 - 1
    a = 32'h0; b = 32'h1234_5678; check1();
    a = 32'h8765_4321; b = 32'h0; check1();
    a = 32'h8000_0000; b = 32'h4000_0000; check1();
    a = 32'h7FFF_FFFF; b = 32'h7FFF_FFFF; check1();     // saturates at maxpos
    a = 32'h0000_0001; b = 32'h8000_0001; check1();
    a = 32'h0000_0003; b = 32'h0000_0003;
    #1 checks++;
    if (y !== 32'h0000_0004) failures++;    // bit-string rounding: ...011|1 rounds to ...100
    for (int n = 0; n < 6000; n++) begin
      a = real_to_posit(rand_in_range(ranges[n % 3]));
      b = real_to_posit(rand_in_range(ranges[n % 3]));
      if (n % 7 == 0) b = -a + 32'($urandom % 5);         // heavy cancellation
      check1();
    end
    for (int n = 0; n < 3000; n++) begin
      // any scale, second operand within 2^20 of the first: the double sum is exact
      a = $urandom >> ($urandom % 31);
      if (a == 0) a = 1;
      b = real_to_posit(posit_to_real(a) * (real'($urandom % 2000000) / 1000000.0 - 1.0) *
                        pow2(int'($urandom % 40) - 20));
      if (n % 2) a = -a;
      check1();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
