// tb_c_element: self-checking testbench of the Muller C-element.
//
// Walks every transition of the two inputs (from each of the four input
// states to each other one), then a long random walk, and after each change
// compares y with the truth table: 00 -> 0, 11 -> 1, otherwise unchanged.
// The cell has no reset, so the test starts by driving both inputs low.
module tb_c_element;

  logic a, b, y;
  int   checks   = 0;
  int   failures = 0;
  bit   y_ref    = 1'b0;

  c_element dut (.a(a), .b(b), .y(y));

  task automatic apply(bit na, bit nb);
    a = na;
    b = nb;
    #1;
    if (na && nb)        y_ref = 1'b1;
    else if (!na && !nb) y_ref = 1'b0;
    checks++;
    if (y !== y_ref) begin
      failures++;
      $display("FAIL a=%0b b=%0b y=%0b expected %0b", na, nb, y, y_ref);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned v;
    apply(0, 0);
    // Every ordered pair of input states, reached from a known output value.
    for (int from = 0; from < 4; from++) begin
      for (int to = 0; to < 4; to++) begin
        for (int pre = 0; pre < 2; pre++) begin
          apply(pre[0], pre[0]);         // set the stored value
          apply(from[1], from[0]);
          apply(to[1], to[0]);
        end
      end
    end
    // Random walk.
    for (int i = 0; i < 2000; i++) begin
      v = $urandom_range(0, 3);
      apply(v[1], v[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
