// tb_mutex: self-checking testbench of the mutual-exclusion element.
//
// Directed cases: a lone request is granted at once; a second request waits
// while the first is held and is granted when the first is withdrawn; the two
// requests rising together are granted to exactly one side, and repeated ties
// alternate between the sides. Then a random walk that changes one or both
// requests at a time, checked step by step against the reference model in
// arb_ref_pkg, with the grants checked for mutual exclusion throughout.
module tb_mutex;
  import arb_ref_pkg::*;

  logic r1, r2, g1, g2;
  int   checks   = 0;
  int   failures = 0;
  int   ties     = 0;
  int   ties_g1  = 0;
  mutex_ref model = new();

  mutex dut (.r1(r1), .r2(r2), .g1(g1), .g2(g2));

  task automatic check(bit exp1, bit exp2, string what);
    checks++;
    if (g1 !== exp1 || g2 !== exp2) begin
      failures++;
      $display("FAIL %s: r1=%0b r2=%0b g1=%0b g2=%0b expected %0b %0b",
               what, r1, r2, g1, g2, exp1, exp2);
    end
  endtask

  task automatic apply(bit n1, bit n2);
    r1 = n1;
    r2 = n2;
    #1;
    model.step(n1, n2);
    if (model.tie_seen) begin
      ties++;
      if (g1) ties_g1++;
    end
    check(model.g1(), model.g2(), "model");
    checks++;
    if (g1 && g2) begin
      failures++;
      $display("FAIL both grants high");
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned v;
    apply(0, 0);
    check(0, 0, "idle");
    // Lone request 1, then request 2 waits, then hand-over.
    apply(1, 0); check(1, 0, "lone r1");
    apply(1, 1); check(1, 0, "r2 waits");
    apply(0, 1); check(0, 1, "hand-over to r2");
    apply(1, 1); check(0, 1, "r1 waits");
    apply(1, 0); check(1, 0, "hand-over to r1");
    apply(0, 0); check(0, 0, "release");
    // Lone request 2.
    apply(0, 1); check(0, 1, "lone r2");
    apply(0, 0); check(0, 0, "release");
    // Ties: side 2 owned at the last contention, so side 1 wins, then alternate.
    apply(1, 1); check(1, 0, "tie after r2 owned");
    apply(1, 0); apply(0, 0);
    apply(1, 1); check(0, 1, "second tie alternates");
    apply(0, 1); apply(0, 0);
    apply(1, 1); check(1, 0, "third tie alternates");
    apply(0, 1); apply(0, 0);
    apply(1, 1); check(0, 1, "fourth tie alternates");
    apply(1, 0); apply(0, 0);
    apply(1, 1); check(1, 0, "fifth tie alternates");
    apply(0, 1); check(0, 1, "loser served after winner leaves");
    apply(0, 0);
    // Steady contention: both sides request together over and over.
    for (int i = 0; i < 200; i++) begin
      apply(1, 1);
      if (g1) begin apply(0, 1); apply(0, 0); end
      else    begin apply(1, 0); apply(0, 0); end
    end
    // Random walk, one or two requests change per step.
    for (int i = 0; i < 5000; i++) begin
      v = $urandom_range(0, 3);
      if ($urandom_range(0, 3) == 0) apply(v[1], v[0]);
      else if (v[0])                 apply(!r1, r2);
      else                           apply(r1, !r2);
    end
    // Fairness of ties: each side should get about half.
    checks++;
    if (ties < 200 || ties_g1 * 10 < ties * 4 || ties_g1 * 10 > ties * 6) begin
      failures++;
      $display("FAIL tie split: %0d ties, %0d to r1", ties, ties_g1);
    end
    $display("ties=%0d won by r1=%0d", ties, ties_g1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
