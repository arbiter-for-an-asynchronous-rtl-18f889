// mutex: two-way mutual-exclusion element.
//
// Two requests r1 and r2 compete for one resource. A request that arrives while
// the other side is idle is granted at once (g1 for r1, g2 for r2). A request
// that arrives while the other side holds the grant waits: its grant rises only
// after the holder drops its request. The two grants are never high together.
//
// The transistor cell is a cross-coupled NAND latch followed by a metastability
// filter. When both requests rise at the same moment the latch hangs between
// the rails, the filter holds both grants low, and noise eventually decides
// the winner at random. A zero-delay digital model cannot be metastable, so
// the tie is decided here by a rule instead: the winner of a tie is the side
// that did not own the resource the last time both requests were high. Ties
// under steady contention therefore alternate, and each side wins half of
// them, which is what the random cell aims for.
//
// Implementation: two level-sensitive latches, both intended.
//   owner2     which side owns the resource while both requests are high. It
//              is transparent while exactly one request is high (the lone
//              requester owns), holds while both are high, and while both are
//              low it is preset to the side that wins the next tie,
//              !contend2.
//   contend2   the owner seen while both requests were high: transparent
//              while both are high, holding otherwise.
// The two latches form a loop, which a lint tool reports as circular logic.
// It stands on purpose: it is the toggle that alternates the tie winner. It
// cannot oscillate because contend2 is transparent only while both requests
// are high and owner2 reads contend2 only while both are low, so one of the
// two latches is always opaque.
//
// Interface: inputs r1, r2; outputs g1, g2. Timing: zero delay. No reset:
// with both requests low the grants are low whatever the latches hold.
module mutex (
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);

  logic owner2;
  logic contend2;

  always_latch begin
    if (r1 != r2)        owner2 = r2;
    else if (!r1 && !r2) owner2 = !contend2;
  end

  always_latch begin
    if (r1 && r2) contend2 = owner2;
  end

  assign g1 = r1 && !owner2;
  assign g2 = r2 &&  owner2;

endmodule
