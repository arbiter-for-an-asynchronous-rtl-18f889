// arb_ref_pkg: reference model of the boundary arbiter, for the testbenches.
//
// The model is written as an event-driven state machine, not as latches: it is
// stepped once per settled input state and returns the grants the arbiter
// should show. It keeps
//   * the two C-element outputs (set when both requests of a side are high,
//     cleared when both are low, kept otherwise),
//   * the owner of the boundary (none, instruction side, result side),
//   * the side that owned the boundary the last time both sides requested at
//     once; a simultaneous arrival is won by the other side.
// A request that finds the boundary owned by the other side waits and takes
// the boundary over as soon as the owner lets go.
package arb_ref_pkg;

  typedef enum logic [1:0] {OWN_NONE, OWN_1, OWN_2} owner_e;

  class mutex_ref;
    owner_e owner     = OWN_NONE;
    bit     last_contended = 1'b0;  // owner when both last requested: 0 side 1, 1 side 2
    bit     tie_seen  = 1'b0;  // the last step resolved a simultaneous arrival

    // Advance to the settled request state (r1, r2).
    function void step(bit r1, bit r2);
      tie_seen = 1'b0;
      case (owner)
        OWN_1: if (!r1) owner = r2 ? OWN_2 : OWN_NONE;
        OWN_2: if (!r2) owner = r1 ? OWN_1 : OWN_NONE;
        default: begin
          if (r1 && r2) begin
            owner    = last_contended ? OWN_1 : OWN_2;
            tie_seen = 1'b1;
          end else if (r1) owner = OWN_1;
          else if (r2)     owner = OWN_2;
        end
      endcase
      if (r1 && r2) last_contended = (owner == OWN_2);
    endfunction

    function bit g1();
      return owner == OWN_1;
    endfunction

    function bit g2();
      return owner == OWN_2;
    endfunction
  endclass

  class arbiter_ref;
    bit       c_inst   = 1'b0;
    bit       c_result = 1'b0;
    mutex_ref mx       = new();

    function void step(bit ri, bit si, bit rr, bit sr);
      if (ri && si)   c_inst = 1'b1;
      if (!ri && !si) c_inst = 1'b0;
      if (rr && sr)   c_result = 1'b1;
      if (!rr && !sr) c_result = 1'b0;
      mx.step(c_inst, c_result);
    endfunction

    function bit gi();
      return mx.g1();
    endfunction

    function bit gr();
      return mx.g2();
    endfunction
  endclass

endpackage
