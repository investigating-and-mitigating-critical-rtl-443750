// tb_hmux: the redundant multiplexer must select a or b as sel says.
module tb_hmux;
  localparam int W = 32;
  logic [W-1:0] a, b, y;
  logic sel;
  int checks = 0, failures = 0;

  hmux #(.W(W)) dut (.a(a), .b(b), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a = $urandom; b = $urandom; sel = 1'($urandom);
      #1;
      checks++;
      if (y != (sel ? b : a)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
