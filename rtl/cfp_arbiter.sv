// cfp_arbiter: clockless arbiter for one boundary of a counterflow pipeline.
//
// The stage below and the stage above exchange instructions (upward) and
// results (downward) over two separate buses. Only one of the two may move at
// a time, so that every instruction meets every result in some stage. The
// arbiter enforces that:
//   * an instruction transfer is granted (gi) once the receiver asks for it
//     (ri) and the sender offers it (si);
//   * a result transfer is granted (gr) once rr and sr are both high;
//   * a granted transfer keeps its grant until both of its request lines are
//     low again (transfer complete), and the other side waits until then;
//   * gi and gr are never high together.
//
// Structure: each pair of requests goes through a Muller C-element, which
// rises when both requests are high and falls only when both are low. The two
// C-element outputs are the requests of a mutual-exclusion element, whose
// grants are gi and gr. The handshake acknowledge (transfer complete) and
// the data buses pass between the stages directly and do not enter the
// arbiter.
//
// Interface: req (ri, si, rr, sr) in, gnt (gi, gr) out, see cfp_pkg.
// Timing: zero delay; grants follow the request changes in the same time step.
// The structure is the one proposed for this arbiter; the struct ports and
// the tie rule inside mutex are this design's choices.
module cfp_arbiter
  import cfp_pkg::*;
(
  input  arb_req_t req,
  output arb_gnt_t gnt
);

  logic inst_req;    // both instruction-side stages are requesting
  logic result_req;  // both result-side stages are requesting

  c_element u_c_inst (
    .a (req.si),
    .b (req.ri),
    .y (inst_req)
  );

  c_element u_c_result (
    .a (req.sr),
    .b (req.rr),
    .y (result_req)
  );

  mutex u_mutex (
    .r1 (inst_req),
    .r2 (result_req),
    .g1 (gnt.gi),
    .g2 (gnt.gr)
  );

  // The two buses must never be granted together.
  always_comb begin
    assert final (!(gnt.gi && gnt.gr))
      else $error("cfp_arbiter: gi and gr granted together");
  end

endmodule
