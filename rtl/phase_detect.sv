// phase_detect: input phase completion detection and gate-phase state of a
// four-input phased logic gate.
//
// A PL gate may fire once every input token carries the gate's own phase.
// Each LEDR input pair is reduced to its phase with an XOR (v ^ t); these
// four phases and the single-wire feedback input fi feed a 5-input Muller
// C-element.  The C-element output z is the phase of the last complete set
// of inputs, and the gate phase is its complement: when all five inputs
// equal the gate phase, z takes that phase and the gate phase toggles.  So
// gate_phase toggles exactly once per complete set of input tokens.
//
// Interface:
//   a..d       LEDR inputs (only their phases are used here)
//   fi         feedback input, a phase carried on one wire.  A gate that
//              needs no feedback ties fi to its own gate_phase (fo_b), which
//              never blocks firing.
//   r          active-high reset: gate_phase becomes even (0)
//   gate_phase current gate phase, 0 = even
//   fo         feedback output, complement of gate_phase; at rest it equals
//              the phase of the gate's output token
//   fo_b       feedback output of the other polarity (= gate_phase)
// Timing: no clock.  gate_phase changes as soon as the last input arrives.
//
// The C-element is a latch, and a tie of fi or of an unused input to the
// gate's own phase makes a loop through it that lint reports; both are
// intended and settle at once (such an input always agrees with the
// firing condition).
//
// The XOR-plus-C-element structure, the reset input and the two feedback
// outputs follow the source logic diagram.  Which polarity of the C-element
// output is called the gate phase, and the tie-off rule for an unused fi,
// are this design's reading of that diagram.
module phase_detect
  import pl_pkg::*;
(
  input  ledr_t a,
  input  ledr_t b,
  input  ledr_t c,
  input  ledr_t d,
  input  logic  fi,
  input  logic  r,
  output logic  gate_phase,
  output logic  fo,
  output logic  fo_b
);

  logic [4:0] in_phase;
  logic       z;

  assign in_phase = {fi, ledr_phase(d), ledr_phase(c), ledr_phase(b), ledr_phase(a)};

  // Reset value 1 makes the gate phase even after reset.
  c_element #(.N(5), .RST_VAL(1'b1)) u_c (
    .in (in_phase),
    .r  (r),
    .z  (z)
  );

  assign gate_phase = ~z;
  assign fo         = z;
  assign fo_b       = gate_phase;

endmodule
