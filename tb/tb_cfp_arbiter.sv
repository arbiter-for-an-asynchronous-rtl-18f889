// tb_cfp_arbiter: self-checking testbench of one boundary arbiter.
//
// Directed cases follow the arbitration rules: a grant needs both requests of
// its side; with only one of them high the grant does not change; a granted
// side keeps its grant until both of its requests are low; a side that
// completes its request pair while the other side is granted waits and is
// granted when the other transfer completes; both pairs completing at once
// grant exactly one side. Then a random walk that changes one or two request
// wires per step, checked against the reference model in arb_ref_pkg. The
// grants are checked for mutual exclusion after every step.
module tb_cfp_arbiter;
  import cfp_pkg::*;
  import arb_ref_pkg::*;

  arb_req_t   req;
  arb_gnt_t   gnt;
  int         checks   = 0;
  int         failures = 0;
  arbiter_ref model    = new();

  cfp_arbiter dut (.req(req), .gnt(gnt));

  task automatic expect_gnt(bit gi, bit gr, string what);
    checks++;
    if (gnt.gi !== gi || gnt.gr !== gr) begin
      failures++;
      $display("FAIL %s: ri=%0b si=%0b rr=%0b sr=%0b gi=%0b gr=%0b expected %0b %0b",
               what, req.ri, req.si, req.rr, req.sr, gnt.gi, gnt.gr, gi, gr);
    end
  endtask

  // Apply a request state, let it settle, step the model and compare.
  task automatic apply(bit ri, bit si, bit rr, bit sr);
    req = '{ri: ri, si: si, rr: rr, sr: sr};
    #1;
    model.step(ri, si, rr, sr);
    expect_gnt(model.gi(), model.gr(), "model");
    checks++;
    if (gnt.gi && gnt.gr) begin
      failures++;
      $display("FAIL gi and gr both high");
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
    //              ri si rr sr
    apply(0, 0, 0, 0); expect_gnt(0, 0, "idle");
    // Instruction transfer: one request alone does nothing.
    apply(1, 0, 0, 0); expect_gnt(0, 0, "RI alone");
    apply(0, 0, 0, 0);
    apply(0, 1, 0, 0); expect_gnt(0, 0, "SI alone");
    apply(1, 1, 0, 0); expect_gnt(1, 0, "RI SI");
    apply(0, 1, 0, 0); expect_gnt(1, 0, "GI held, RI low");
    apply(0, 0, 0, 0); expect_gnt(0, 0, "instruction transfer complete");
    // Result transfer.
    apply(0, 0, 1, 0); expect_gnt(0, 0, "RR alone");
    apply(0, 0, 1, 1); expect_gnt(0, 1, "RR SR");
    apply(0, 0, 0, 1); expect_gnt(0, 1, "GR held, RR low");
    apply(0, 0, 0, 0); expect_gnt(0, 0, "result transfer complete");
    // Results hold the boundary; instructions wait for them.
    apply(0, 0, 1, 1); expect_gnt(0, 1, "GR");
    apply(1, 1, 1, 1); expect_gnt(0, 1, "instruction waits");
    apply(1, 1, 0, 1); expect_gnt(0, 1, "still waits, SR high");
    apply(1, 1, 0, 0); expect_gnt(1, 0, "instruction granted after result");
    apply(1, 1, 1, 1); expect_gnt(1, 0, "result waits");
    apply(0, 0, 1, 1); expect_gnt(0, 1, "result granted after instruction");
    apply(0, 0, 0, 0);
    // Both pairs complete together: one winner, the other follows.
    // The instruction side owned at the last contention, so results win.
    apply(1, 1, 1, 1); expect_gnt(0, 1, "tie after instructions owned");
    apply(1, 1, 0, 0); expect_gnt(1, 0, "loser follows");
    apply(0, 0, 0, 0);
    apply(1, 1, 1, 1); expect_gnt(1, 0, "next tie goes to instructions");
    apply(0, 0, 1, 1); expect_gnt(0, 1, "loser follows");
    apply(0, 0, 0, 0); expect_gnt(0, 0, "idle");
    // Random walk.
    for (int i = 0; i < 20000; i++) begin
      v = $urandom_range(0, 15);
      if ($urandom_range(0, 7) == 0)
        apply(v[3], v[2], v[1], v[0]);
      else if ($urandom_range(0, 5) == 0)
        // both wires of one side together
        if (v[0]) apply(!req.ri, !req.si, req.rr, req.sr);
        else      apply(req.ri, req.si, !req.rr, !req.sr);
      else
        case (v[1:0])
          2'd0: apply(!req.ri, req.si, req.rr, req.sr);
          2'd1: apply(req.ri, !req.si, req.rr, req.sr);
          2'd2: apply(req.ri, req.si, !req.rr, req.sr);
          default: apply(req.ri, req.si, req.rr, !req.sr);
        endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
