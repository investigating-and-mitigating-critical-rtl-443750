// tb_posit_decode: the decoded sign, scale and fraction of random Posit(32,2)
// codes must rebuild the value given by an independent bit-serial decoder:
// (-1)^sign * frac / 2^29 * 2^scale. Zero and NaR flags are checked too;
// both the plain and the redundant-multiplexer decoder are tested.
module tb_posit_decode;
  import fpp_pkg::*;
  import tb_ref_pkg::*;
  logic [31:0] p;
  logic [1:0] sg, zr, nr;
  logic [1:0][XW-1:0] sc;
  logic [1:0][29:0] fr;
  int checks = 0, failures = 0;

  posit_decode #(.HARDEN(1'b0)) u0 (.p(p), .sign(sg[0]), .zero(zr[0]), .nar(nr[0]), .scale(sc[0]), .frac(fr[0]));
  posit_decode #(.HARDEN(1'b1)) u1 (.p(p), .sign(sg[1]), .zero(zr[1]), .nar(nr[1]), .scale(sc[1]), .frac(fr[1]));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v, ref_v;
    for (int n = 0; n < 20000; n++) begin
      case (n)
        0: p = 32'h0;
        1: p = 32'h8000_0000;
        2: p = 32'h7FFF_FFFF;
        3: p = 32'h0000_0001;
        4: p = 32'h8000_0001;
        default: p = $urandom >> ($urandom % 31);
      endcase
      if (n > 4 && n % 2 != 0) p = -p;
      #1;
      for (int u = 0; u < 2; u++) begin
        checks++;
        if (p == 0) begin
          if (!zr[u] || nr[u]) failures++;
        end else if (p == 32'h8000_0000) begin
          if (!nr[u] || zr[u]) failures++;
        end else begin
          ref_v = posit_to_real(p);
          v = real'(fr[u]) / 536870912.0 * pow2(int'(signed'(sc[u])));
          if (sg[u]) v = -v;
          if (v != ref_v || zr[u] || nr[u]) begin
            failures++;
            if (failures < 10) $display("p=%h scale=%0d frac=%h got %g want %g", p, signed'(sc[u]), fr[u], v, ref_v);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
