// pl_pkg: types and helpers shared by the phased logic (PL) gate modules.
//
// A PL signal is a Level Encoded two-phase Dual-Rail (LEDR) pair: the value
// rail v carries the data bit and the timing rail t is chosen so that the
// phase of the pair, v XOR t, alternates between even (0) and odd (1) from
// one data token to the next.  Exactly one rail changes per token:
//
//   v t | value phase
//   0 0 |   0   even
//   1 1 |   1   even
//   0 1 |   0   odd
//   1 0 |   1   odd
//
// The encoding table, and even phase being logic 0, follow the source
// description.  The helper names are this design's own.
package pl_pkg;

  // Phase of a token or of a gate.
  typedef enum logic {
    PH_EVEN = 1'b0,
    PH_ODD  = 1'b1
  } phase_e;

  // One LEDR wire pair.
  typedef struct packed {
    logic v;  // value rail
    logic t;  // timing rail
  } ledr_t;

  // Phase carried by a LEDR pair.
  function automatic logic ledr_phase(ledr_t s);
    return s.v ^ s.t;
  endfunction

  // LEDR pair that carries value `val` in phase `ph`.
  function automatic ledr_t ledr_encode(logic val, logic ph);
    ledr_t s;
    s.v = val;
    s.t = val ^ ph;
    return s;
  endfunction

endpackage
