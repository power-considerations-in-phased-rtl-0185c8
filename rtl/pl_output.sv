// pl_output: output latching and phase encoding of a phased logic gate.
//
// When the gate phase toggles, the output phase (v ^ t of the latched pair)
// equals the gate phase, which raises the latch enable.  Two transparent
// latches then take v = new_v and t = XNOR(new_v, gate_phase); the new pair
// has the phase opposite to the gate phase, so the enable falls again and
// the latches hold.  The enable is therefore a self-timed pulse, one per
// firing, and the value rail only toggles when the computed value changes.
//
// Interface:
//   new_v        value from the compute element
//   gate_phase   from phase_detect
//   r            active-high reset: v = v_rbit, t = t_rbit, enable low
//   v_rbit/t_rbit reset values; for the odd output phase required after
//                reset, t_rbit must equal ~v_rbit
//   v, t         LEDR output, phase opposite to the gate phase at rest
//   t_b          inverted timing rail; (v, t_b) carries the gate's own
//                phase and is used on a net that must hold a token after
//                reset
//   enable       latch enable (output phase equals gate phase)
// Timing: no clock.  For a correct capture the enable pulse must outlast the
// settling of new_v; in the physical gate this is a matched internal delay.
//
// Lint reports a combinational loop enable -> latches -> output_phase ->
// enable.  It is the intended self-timed pulse and stands; the loop always
// settles with enable low because the latched pair has the phase opposite
// to gate_phase.  Some tools also decide that the latches are not latches,
// because inside the loop they are always rewritten; they are latches.
//
// The latch pair, the XNOR on the timing rail, the output-phase XOR and the
// phase-equality gate qualified by reset follow the source logic diagram.
module pl_output (
  input  logic new_v,
  input  logic gate_phase,
  input  logic r,
  input  logic v_rbit,
  input  logic t_rbit,
  output logic v,
  output logic t,
  output logic t_b,
  output logic enable
);

  logic new_t;
  logic output_phase;

  assign new_t        = ~(new_v ^ gate_phase);
  assign output_phase = v ^ t;
  assign enable       = ~r & ~(output_phase ^ gate_phase);

  always_latch begin
    if (r)           v = v_rbit;
    else if (enable) v = new_v;
  end

  always_latch begin
    if (r)           t = t_rbit;
    else if (enable) t = new_t;
  end

  assign t_b = ~t;

endmodule
