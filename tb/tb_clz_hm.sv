// tb_clz_hm: leading-zero count of the hardened 32-bit cascade and of the
// plain 64-bit one against a bit-by-bit count, for words with a random
// number of leading zeros.
module tb_clz_hm;
  logic [31:0] x;
  logic [4:0]  cnt;
  logic        zero;
  logic [63:0] x64;
  logic [5:0]  cnt64;
  logic        zero64;
  int checks = 0, failures = 0;

  clz_hm #(.W(32), .HARDEN(1'b1)) dut   (.x(x), .cnt(cnt), .zero(zero));
  clz_hm #(.W(64), .HARDEN(1'b0)) dut64 (.x(x64), .cnt(cnt64), .zero(zero64));

  function automatic int lz(input logic [63:0] v, input int w);
    for (int i = w - 1; i >= 0; i--) if (v[i]) return w - 1 - i;
    return w;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      x   = $urandom >> ($urandom % 33);
      x64 = {$urandom, $urandom} >> ($urandom % 65);
      #1;
      checks++;
      if (lz(64'(x), 32) == 32) begin
        if (!zero) failures++;
      end else if (zero || int'(cnt) != lz(64'(x), 32)) begin
        failures++; $display("x=%h cnt=%0d", x, cnt);
      end
      checks++;
      if (lz(x64, 64) == 64) begin
        if (!zero64) failures++;
      end else if (zero64 || int'(cnt64) != lz(x64, 64)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
