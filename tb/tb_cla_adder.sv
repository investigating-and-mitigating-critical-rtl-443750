// tb_cla_adder: checks sum and every carry of cla_adder against integer
// arithmetic for random operands, then checks that an injected stuck-at on a
// carry net shows on that carry and on the sum bit it feeds.
module tb_cla_adder;
  import fpp_pkg::*;
  localparam int W = 10;
  logic [W-1:0] a, b, s;
  logic cin;
  logic [W:0] c;
  cfi_t fi;
  int checks = 0, failures = 0;

  cla_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .fi(fi), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] full;
    logic [W:0] part;
    fi = '0;
    for (int n = 0; n < 2000; n++) begin
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      #1;
      full = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
      checks++;
      if ({c[W], s} != full) begin failures++; $display("sum mismatch %h+%h+%b", a, b, cin); end
      for (int i = 1; i <= W; i++) begin
        part = (W+1)'((a & ((1 << i) - 1))) + (W+1)'((b & ((1 << i) - 1))) + (W+1)'(cin);
        checks++;
        if (c[i] != part[i]) failures++;
      end
    end
    // stuck-at on carry 4
    fi = '{en: 1'b1, idx: 4'd4, val: 1'b1};
    a = 10'd0; b = 10'd0; cin = 1'b0;
    #1;
    checks++;
    if (c[4] !== 1'b1 || s !== 10'h010) begin failures++; $display("fault not visible: s=%h", s); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
