// cfp_arbiter_array: the arbitration fabric of a counterflow pipeline.
//
// A pipeline of STAGES stages has STAGES-1 boundaries, and every boundary has
// an arbiter of its own that decides whether an instruction moves up or a
// result moves down across it. Boundary k lies between stage k (below) and
// stage k+1 (above), counting the bottom stage as 0. The arbiters work
// independently of one another: transfers on different boundaries may happen
// at the same time, only the two transfers across one boundary exclude each
// other. The pipeline stages themselves, their data buses and their
// transfer-complete acknowledges are outside this module; their request and
// grant wires are the ports.
//
// Parameters: STAGES, number of pipeline stages (default 4, the pipeline
// drawn for this design).
// Interface: req[k] (ri, si, rr, sr) and gnt[k] (gi, gr) for boundary k.
// Timing: zero delay, no clock, no reset (all requests low clears every
// arbiter). Placing one arbiter per boundary follows the design; the port
// layout is this design's choice.
module cfp_arbiter_array
  import cfp_pkg::*;
#(
  parameter int unsigned STAGES = 4
) (
  input  arb_req_t req [STAGES-1],
  output arb_gnt_t gnt [STAGES-1]
);

  if (STAGES < 2) begin : g_bad_stages
    $error("cfp_arbiter_array: STAGES must be at least 2");
  end

  for (genvar k = 0; k < STAGES - 1; k++) begin : g_boundary
    cfp_arbiter u_arbiter (
      .req (req[k]),
      .gnt (gnt[k])
    );
  end

endmodule
