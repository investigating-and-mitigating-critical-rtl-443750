// tb_scr_adder_bank: drives the S-CR bank with random slot operations and
// checks every delivered sum against integer addition, and the number of
// cycles each operation takes: zero extra cycles without a detected fault,
// exactly two extra when the checker fires. Fault scenarios:
//   1. stuck-at in the CLA of slot 1: spare takes slot 1, results correct;
//   2. stuck-at in the carry predictor of slot 2: predictor flagged faulty;
//   3. second faulty CLA after the spare is used: alarm raised.
module tb_scr_adder_bank;
  import fpp_pkg::*;
  localparam int W = 10;
  logic clk = 0, rst_n;
  logic chk;
  logic [2:0][W-1:0] a, b, s;
  logic [2:0] cin;
  fi_t fi;
  logic ok, hold, det;
  scr_status_t st;
  int checks = 0, failures = 0;
  int n_detect = 0;
  bit skip_sum_check = 0;   // an unrepairable fault may leave a wrong sum

  always #5 clk = ~clk;

  scr_adder_bank #(.W(W), .NSLOT(3)) dut (.clk(clk), .rst_n(rst_n), .chk(chk), .a(a), .b(b), .cin(cin),
    .fi(fi), .s(s), .ok(ok), .hold(hold), .det(det), .status(st));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (det) n_detect++;

  task automatic do_op(output int extra);
    @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      a[k] = W'($urandom); b[k] = W'($urandom); cin[k] = 1'($urandom);
    end
    chk = 1'b1;
    extra = 0;
    #1;
    while (!ok) begin
      @(negedge clk);
      #1;
      extra++;
      if (extra > 10) break;
    end
    for (int k = 0; k < 3 && !skip_sum_check; k++) begin
      checks++;
      if (s[k] != W'(a[k] + b[k] + W'(cin[k]))) begin
        failures++;
        $display("slot %0d: %h+%h+%b gave %h", k, a[k], b[k], cin[k], s[k]);
      end
    end
    // the core drops chk in the cycle after it takes the result
    @(posedge clk);
    #1 chk = 1'b0;
  endtask

  task automatic reset_dut();
    chk = 1'b0; rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
  endtask

  // runs n operations, returns how many took two extra cycles; any other
  // extra count is a failure
  task automatic run(input int n, output int repaired);
    int x;
    repaired = 0;
    for (int i = 0; i < n; i++) begin
      do_op(x);
      checks++;
      if (x == 2) repaired++;
      else if (x != 0) begin failures++; $display("unexpected latency %0d", x); end
    end
  endtask

  initial begin
    int r;
    fi = FI_NONE;
    a = '0; b = '0; cin = '0;
    reset_dut();
    run(200, r);
    checks++;
    if (r != 0 || n_detect != 0) begin failures++; $display("clean run: %0d %0d", r, n_detect); end

    // 1: faulty CLA in slot 1
    fi = '{en: 1'b1, tgt: FT_CLA, slot: 2'd1, idx: 4'd5, val: 1'b1};
    run(200, r);
    checks++;
    if (r != 1) begin failures++; $display("scenario 1: %0d repairs", r); end
    checks++;
    if (!st.spare_used || st.spare_slot != 2'd1 || st.pred_fault || st.alarm) begin failures++; $display("s1 status %p", st); end

    // 2: faulty predictor in slot 2
    reset_dut();
    fi = '{en: 1'b1, tgt: FT_PRED, slot: 2'd2, idx: 4'd6, val: 1'b0};
    run(200, r);
    checks++;
    if (r != 1) begin failures++; $display("scenario 2: %0d repairs", r); end
    checks++;
    if (!st.pred_fault || st.alarm) begin failures++; $display("s2 status %p", st); end

    // 3: a second faulty CLA once the spare is in use
    reset_dut();
    fi = '{en: 1'b1, tgt: FT_CLA, slot: 2'd0, idx: 4'd2, val: 1'b1};
    run(100, r);
    fi = '{en: 1'b1, tgt: FT_CLA, slot: 2'd2, idx: 4'd7, val: 1'b0};
    skip_sum_check = 1;
    begin
      int x, rr = 0;
      for (int i = 0; i < 100 && !st.alarm; i++) begin
        do_op(x);
        if (x == 2) rr++;
      end
      checks++;
      if (!st.alarm || rr != 1) begin failures++; $display("s3 %p %0d", st, rr); end
    end
    fi = FI_NONE;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
