// tb_carry_predictor: the predicted carries and sum parity are compared with
// integer arithmetic for random operands; an injected fault must show.
module tb_carry_predictor;
  import fpp_pkg::*;
  localparam int W = 10;
  logic [W-1:0] a, b;
  logic cin, par;
  logic [W:0] c;
  cfi_t fi;
  int checks = 0, failures = 0;

  carry_predictor #(.W(W)) dut (.a(a), .b(b), .cin(cin), .fi(fi), .c(c), .par(par));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] full, part;
    fi = '0;
    for (int n = 0; n < 2000; n++) begin
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      #1;
      full = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
      checks++;
      if (par != ^full[W-1:0]) failures++;
      checks++;
      if (c[W] != full[W]) failures++;
      for (int i = 1; i < W; i++) begin
        part = (W+1)'((a & ((1 << i) - 1))) + (W+1)'((b & ((1 << i) - 1))) + (W+1)'(cin);
        checks++;
        if (c[i] != part[i]) failures++;
      end
    end
    fi = '{en: 1'b1, idx: 4'd3, val: 1'b1};
    a = '0; b = '0; cin = 1'b0;
    #1;
    checks++;
    if (c[3] !== 1'b1 || par !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
