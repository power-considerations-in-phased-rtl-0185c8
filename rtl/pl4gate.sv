// pl4gate: four-input phased logic gate with decoupled control and compute.
//
// A phased logic gate fires once all of its input tokens carry the gate's
// phase.  Firing toggles the gate phase, and the output latches then take a
// new token from the LUT4, opposite in phase to the new gate phase.  The
// control path (phase detection, gate phase, latch enable) switches on every
// firing, but the compute path (LUT4 and value rail) only switches when data
// values change, which is the point of this gate: phase activity no longer
// reads the look-up table.
//
//   phase_detect : 4 input-phase XORs + feedback input -> C-element ->
//                  gate_phase, feedback outputs fo / fo_b
//   lut4         : the Boolean function, optionally protected (see protect)
//   pl_output    : value/timing latches, output phase encoding, enable
//
// Interface:
//   a..d          LEDR inputs (pl_pkg::ledr_t); an unused input is tied to
//                 v = 0, t = own gate phase (fo_b), so that it never blocks
//   fi            feedback input (single wire); unused: tie to fo_b
//   r             active-high reset; gate phase even, output (v_rbit,t_rbit)
//   init          LUT4 contents, bit {d,c,b,a}
//   protect       1: "A" configuration, LUT inputs held until the gate fires;
//                 0: "B" configuration, LUT follows its value inputs
//   v_rbit,t_rbit output reset values; t_rbit = ~v_rbit gives the odd
//                 output phase the reset state needs
//   y             LEDR output, phase opposite to the gate phase at rest
//   y_inv         (v, ~t): same value, phase equal to the gate phase; used
//                 for nets that must carry a token after reset
//   fo, fo_b      feedback outputs (~gate_phase, gate_phase)
//   gate_phase, enable  observation of the control state
// Timing: no clock; the gate is self-timed.  A PL netlist only works if
// every directed loop through gates contains at least one token and some
// delay; the netlist, not the gate, is responsible for that.
//
// Lint reports latches (C-element, output latches, LUT hold latches) and
// combinational loops through them: this is a clockless gate, and those are
// its storage and its self-timed enable pulse; see pl_output.
//
// Structure and reset behaviour follow the source description of the
// improved PL gate; port names beyond those it prints are this design's.
module pl4gate
  import pl_pkg::*;
(
  input  ledr_t       a,
  input  ledr_t       b,
  input  ledr_t       c,
  input  ledr_t       d,
  input  logic        fi,
  input  logic        r,
  input  logic [15:0] init,
  input  logic        protect,
  input  logic        v_rbit,
  input  logic        t_rbit,
  output ledr_t       y,
  output ledr_t       y_inv,
  output logic        fo,
  output logic        fo_b,
  output logic        gate_phase,
  output logic        enable
);

  logic new_v;
  logic t_b;

  phase_detect u_detect (
    .a          (a),
    .b          (b),
    .c          (c),
    .d          (d),
    .fi         (fi),
    .r          (r),
    .gate_phase (gate_phase),
    .fo         (fo),
    .fo_b       (fo_b)
  );

  lut4 u_lut (
    .init    (init),
    .a       (a.v),
    .b       (b.v),
    .c       (c.v),
    .d       (d.v),
    .protect (protect),
    .en      (enable),
    .r       (r),
    .new_v   (new_v)
  );

  pl_output u_out (
    .new_v      (new_v),
    .gate_phase (gate_phase),
    .r          (r),
    .v_rbit     (v_rbit),
    .t_rbit     (t_rbit),
    .v          (y.v),
    .t          (y.t),
    .t_b        (t_b),
    .enable     (enable)
  );

  assign y_inv.v = y.v;
  assign y_inv.t = t_b;

endmodule
