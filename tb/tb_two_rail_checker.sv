// tb_two_rail_checker: equal carry vectors must give a complementary output
// pair (no error); any vector differing in one or more bits must give an
// error.
module tb_two_rail_checker;
  localparam int N = 11;
  logic [N-1:0] x, y;
  logic [1:0] z;
  logic err;
  int checks = 0, failures = 0;

  two_rail_checker #(.N(N)) dut (.x(x), .y(y), .z(z), .err(err));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      x = N'($urandom);
      y = x;
      #1;
      checks++;
      if (err || z[0] == z[1]) failures++;
      y = x ^ (N'(1) << ($urandom % N));
      if (n % 3 == 0) y = y ^ N'($urandom);
      #1;
      checks++;
      if (err != (x != y)) begin failures++; $display("x=%h y=%h err=%b", x, y, err); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
