// tb_tmr_voter: with one copy corrupted in random bits the voter must return
// the two agreeing copies and flag the mismatch; with three equal copies no
// mismatch.
module tb_tmr_voter;
  localparam int W = 8;
  logic [W-1:0] a, b, c, y, g;
  logic mis;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.a(a), .b(b), .c(c), .y(y), .mis(mis));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      g = W'($urandom);
      a = g; b = g; c = g;
      case (n % 3)
        0: a = g ^ W'($urandom | 1);
        1: b = g ^ W'($urandom | 1);
        default: c = g ^ W'($urandom | 1);
      endcase
      #1;
      checks++;
      if (y != g || !mis) failures++;
      a = g; b = g; c = g;
      #1;
      checks++;
      if (y != g || mis) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
