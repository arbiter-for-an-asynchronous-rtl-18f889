// cfp_pkg: types shared by the counterflow-pipeline arbiter and its array.
//
// A counterflow pipeline moves instructions up and results down. At every
// boundary between two neighbouring stages one arbiter receives four request
// wires and returns two grant wires. The two bundles below carry them, one
// bundle per stage boundary. All signals are active high and level sensitive;
// there is no clock anywhere in the arbiter.
package cfp_pkg;

  // Requests seen by the arbiter of one stage boundary.
  typedef struct packed {
    logic ri;  // receiving stage is ready to take a new instruction
    logic si;  // sending stage is ready to pass its instruction on
    logic rr;  // receiving stage is ready to take a new set of results
    logic sr;  // sending stage is ready to pass its results on
  } arb_req_t;

  // Grants returned by the arbiter of one stage boundary.
  // gi and gr are never high together.
  typedef struct packed {
    logic gi;  // instruction transfer granted
    logic gr;  // result transfer granted
  } arb_gnt_t;

endpackage
