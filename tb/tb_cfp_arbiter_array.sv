// tb_cfp_arbiter_array: end-to-end testbench of the arbitration fabric of a
// counterflow pipeline, at the default size (4 stages, 3 arbiters).
//
// The testbench plays the pipeline stages. Each stage has one instruction slot
// and one result slot. Instructions are injected into the bottom stage and
// retired from the top one; results are injected at the top and removed at
// the bottom. At every boundary and for each direction the two neighbouring
// stages run the four-phase protocol the arbiter expects:
//   phase 0  the sender raises its send request when its slot is full, the
//            receiver its receive request when its slot is empty, one wire at
//            a time at random moments;
//   grant    when the grant is seen the token moves across the boundary;
//   phase 1  both stages lower their requests (transfer complete), one wire
//            at a time, and the side returns to phase 0 once its grant is low.
// Every settled step is checked against the reference model of each
// boundary, the grants of one boundary for mutual exclusion, tokens for
// arrival order, and every instruction/result pair for skipping (changing
// sides without having been in the same stage). A second phase drives random
// request wires with no protocol at all. Each mechanism of the arbiter is
// counted and must occur at least once:
//   instruction grant, result grant, a request pair waiting while the other
//   side holds the boundary, a tie (both pairs complete at once), a lone
//   request producing no grant, a grant held while one of its requests is
//   already low, transfers granted on different boundaries at the same time,
//   and an instruction meeting a result in a stage.
module tb_cfp_arbiter_array;
  import cfp_pkg::*;
  import arb_ref_pkg::*;

  localparam int unsigned STAGES = 4;
  localparam int unsigned NB     = STAGES - 1;

  arb_req_t req [NB];
  arb_gnt_t gnt [NB];

  cfp_arbiter_array dut (.req(req), .gnt(gnt));

  int checks   = 0;
  int failures = 0;

  // Mechanism counters.
  int n_gi, n_gr, n_wait, n_tie, n_lone, n_hold, n_concurrent, n_meet;

  arbiter_ref model [NB];

  // Pipeline state kept by the testbench (stage s, 0 at the bottom).
  bit inst_full [STAGES];
  int inst_id   [STAGES];
  bit res_full  [STAGES];
  int res_id    [STAGES];
  int next_inst, next_res, retired_inst, removed_res;

  // Protocol phase per boundary and side (0 raising, 1 lowering).
  bit ph_i [NB];
  bit ph_r [NB];
  bit prev_gi [NB];
  bit prev_gr [NB];

  // Relative position of each instruction/result pair: -1 below, 0 same
  // stage, +1 above.
  int rel [longint];

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // Let the requests settle, then check every boundary.
  task automatic settle_and_check();
    int granted;
    #1;
    granted = 0;
    for (int b = 0; b < NB; b++) begin
      bit c_i_before, c_r_before;
      c_i_before = model[b].c_inst;
      c_r_before = model[b].c_result;
      model[b].step(req[b].ri, req[b].si, req[b].rr, req[b].sr);
      checks++;
      if (gnt[b].gi !== model[b].gi() || gnt[b].gr !== model[b].gr())
        fail($sformatf("boundary %0d: req=%b gnt=%b expected gi=%0b gr=%0b",
                       b, req[b], gnt[b], model[b].gi(), model[b].gr()));
      checks++;
      if (gnt[b].gi && gnt[b].gr) fail($sformatf("boundary %0d: gi and gr together", b));
      if (gnt[b].gi && !prev_gi[b]) n_gi++;
      if (gnt[b].gr && !prev_gr[b]) n_gr++;
      if (model[b].mx.tie_seen) n_tie++;
      if (req[b].ri && req[b].si && gnt[b].gr) n_wait++;
      if (req[b].rr && req[b].sr && gnt[b].gi) n_wait++;
      if ((req[b].ri ^ req[b].si) && !c_i_before && !gnt[b].gi) n_lone++;
      if ((req[b].rr ^ req[b].sr) && !c_r_before && !gnt[b].gr) n_lone++;
      if (gnt[b].gi && !(req[b].ri && req[b].si)) n_hold++;
      if (gnt[b].gr && !(req[b].rr && req[b].sr)) n_hold++;
      if (gnt[b].gi || gnt[b].gr) granted++;
      prev_gi[b] = gnt[b].gi;
      prev_gr[b] = gnt[b].gr;
    end
    if (granted > 1) n_concurrent++;
  endtask

  // Skipping check over all instruction/result pairs in the pipeline.
  task automatic check_pairs();
    for (int si = 0; si < STAGES; si++) begin
      if (!inst_full[si]) continue;
      for (int sr = 0; sr < STAGES; sr++) begin
        longint key;
        int     now;
        if (!res_full[sr]) continue;
        key = (longint'(inst_id[si]) << 32) | longint'(res_id[sr]);
        now = (si < sr) ? -1 : (si > sr) ? 1 : 0;
        if (now == 0 && (!rel.exists(key) || rel[key] != 0)) n_meet++;
        if (rel.exists(key)) begin
          checks++;
          if (rel[key] * now < 0)
            fail($sformatf("instruction %0d skipped result %0d", inst_id[si], res_id[sr]));
        end
        rel[key] = now;
      end
    end
  endtask

  // One step of the stage protocol: possibly change up to two request wires,
  // inject or remove tokens at the ends, then act on the grants.
  task automatic protocol_step();
    int changes;
    changes = ($urandom_range(0, 3) == 0) ? 2 : 1;
    for (int c = 0; c < changes; c++) begin
      int b;
      int w;
      b = $urandom_range(0, NB - 1);
      w = $urandom_range(0, 3);
      case (w)
        0: if (!ph_i[b]) begin if (!inst_full[b+1]) req[b].ri = 1'b1; end
           else req[b].ri = 1'b0;
        1: if (!ph_i[b]) begin if (inst_full[b])    req[b].si = 1'b1; end
           else req[b].si = 1'b0;
        2: if (!ph_r[b]) begin if (!res_full[b])    req[b].rr = 1'b1; end
           else req[b].rr = 1'b0;
        default:
           if (!ph_r[b]) begin if (res_full[b+1])   req[b].sr = 1'b1; end
           else req[b].sr = 1'b0;
      endcase
    end
    // Ends of the pipeline.
    if (!inst_full[0] && $urandom_range(0, 3) == 0) begin
      inst_full[0] = 1'b1;
      inst_id[0]   = next_inst++;
    end
    if (inst_full[STAGES-1] && $urandom_range(0, 3) == 0) begin
      checks++;
      if (inst_id[STAGES-1] != retired_inst)
        fail($sformatf("instruction %0d retired, expected %0d", inst_id[STAGES-1], retired_inst));
      retired_inst++;
      inst_full[STAGES-1] = 1'b0;
    end
    if (!res_full[STAGES-1] && $urandom_range(0, 3) == 0) begin
      res_full[STAGES-1] = 1'b1;
      res_id[STAGES-1]   = next_res++;
    end
    if (res_full[0] && $urandom_range(0, 3) == 0) begin
      checks++;
      if (res_id[0] != removed_res)
        fail($sformatf("result %0d removed, expected %0d", res_id[0], removed_res));
      removed_res++;
      res_full[0] = 1'b0;
    end
    settle_and_check();
    // Act on grants.
    for (int b = 0; b < NB; b++) begin
      if (!ph_i[b] && gnt[b].gi) begin
        checks++;
        if (!inst_full[b] || inst_full[b+1])
          fail($sformatf("boundary %0d: instruction granted with no slot to move", b));
        inst_full[b+1] = 1'b1;
        inst_id[b+1]   = inst_id[b];
        inst_full[b]   = 1'b0;
        ph_i[b]        = 1'b1;
      end else if (ph_i[b] && !req[b].ri && !req[b].si && !gnt[b].gi) begin
        ph_i[b] = 1'b0;
      end
      if (!ph_r[b] && gnt[b].gr) begin
        checks++;
        if (!res_full[b+1] || res_full[b])
          fail($sformatf("boundary %0d: result granted with no slot to move", b));
        res_full[b]   = 1'b1;
        res_id[b]     = res_id[b+1];
        res_full[b+1] = 1'b0;
        ph_r[b]       = 1'b1;
      end else if (ph_r[b] && !req[b].rr && !req[b].sr && !gnt[b].gr) begin
        ph_r[b] = 1'b0;
      end
    end
    check_pairs();
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      model[b]   = new();
      req[b]     = '0;
      ph_i[b]    = 1'b0;
      ph_r[b]    = 1'b0;
      prev_gi[b] = 1'b0;
      prev_gr[b] = 1'b0;
    end
    for (int s = 0; s < STAGES; s++) begin
      inst_full[s] = 1'b0;
      res_full[s]  = 1'b0;
      inst_id[s]   = 0;
      res_id[s]    = 0;
    end
    {n_gi, n_gr, n_wait, n_tie, n_lone, n_hold, n_concurrent, n_meet} = '0;
    next_inst = 0; next_res = 0; retired_inst = 0; removed_res = 0;
    settle_and_check();

    // Phase 1: the stages run the transfer protocol.
    for (int i = 0; i < 30000; i++) protocol_step();
    checks++;
    if (retired_inst < 100 || removed_res < 100)
      fail($sformatf("too little traffic: %0d instructions, %0d results", retired_inst, removed_res));

    // Phase 2: unconstrained request wires.
    for (int i = 0; i < 20000; i++) begin
      int b;
      int unsigned v;
      b = $urandom_range(0, NB - 1);
      v = $urandom_range(0, 15);
      if ($urandom_range(0, 4) == 0) req[b] = arb_req_t'(v);
      else req[b] = req[b] ^ arb_req_t'(4'b1 << v[1:0]);
      settle_and_check();
    end

    $display("traffic: %0d instructions retired, %0d results removed", retired_inst, removed_res);
    $display("mechanisms: gi=%0d gr=%0d wait=%0d tie=%0d lone=%0d hold=%0d concurrent=%0d meet=%0d",
             n_gi, n_gr, n_wait, n_tie, n_lone, n_hold, n_concurrent, n_meet);
    checks++; if (n_gi == 0)         fail("no instruction grant");
    checks++; if (n_gr == 0)         fail("no result grant");
    checks++; if (n_wait == 0)       fail("no request waited for the other side");
    checks++; if (n_tie == 0)        fail("no tie");
    checks++; if (n_lone == 0)       fail("no lone request");
    checks++; if (n_hold == 0)       fail("no grant held over a lowered request");
    checks++; if (n_concurrent == 0) fail("no concurrent grants on different boundaries");
    checks++; if (n_meet == 0)       fail("no instruction met a result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
