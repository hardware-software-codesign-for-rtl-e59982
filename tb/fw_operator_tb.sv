// fw_operator_tb: checks the FW operator q = min(d, a + b) with saturating
// add, on corner cases (infinity operands, sums that overflow, equal
// values, disabled operator) and on random operands. The expected value is
// computed with 32-bit integer arithmetic in the testbench.
module fw_operator_tb;
  localparam int W = 16;
  localparam int INF = (1 << W) - 1;

  logic         en;
  logic [W-1:0] d, a, b, q;
  int checks = 0, failures = 0;

  fw_operator #(.W(W)) dut (.en, .d, .a, .b, .q);

  task automatic check(bit e, int dv, int av, int bv);
    int sum, exp;
    en = e; d = W'(dv); a = W'(av); b = W'(bv);
    #1;
    sum = av + bv;
    if (sum > INF) sum = INF;
    exp = (e && sum < dv) ? sum : dv;
    checks++;
    if (int'(q) != exp) begin
      failures++;
      $display("FAIL: en=%0d d=%0d a=%0d b=%0d q=%0d expected %0d", e, dv, av, bv, q, exp);
    end
  endtask

  initial begin
    check(1, 100, 30, 40);       // shorter path found
    check(1, 50, 30, 40);        // longer path ignored
    check(1, 70, 30, 40);        // equal
    check(1, INF, INF, 5);       // infinity stays infinity
    check(1, 10, INF, 0);
    check(1, INF, 40000, 40000); // overflow saturates
    check(1, INF, 3, 4);         // path through a reachable pivot
    check(0, 100, 1, 1);         // disabled: pass through
    check(1, 0, 0, 0);
    for (int n = 0; n < 5000; n++)
      check($urandom_range(0, 7) != 0, $urandom_range(0, INF),
            ($urandom_range(0, 9) == 0) ? INF : $urandom_range(0, INF / 2 + 2000),
            $urandom_range(0, INF / 2 + 2000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
