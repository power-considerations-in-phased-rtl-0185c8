// c_element: N-input Muller C-element with reset.
//
// The output z copies the inputs when they all agree (all 1 sets z, all 0
// clears z) and holds its value while they disagree, so z toggles once per
// complete set of input transitions.  PL netlists use a 4-input C-element
// ("Cgate4") to merge several single-wire feedback nets into one, and the PL
// gate uses one to detect that every input has arrived in the gate's phase.
//
// Interface: in[N-1:0] inputs, r active-high asynchronous reset that forces
// z to RST_VAL, z the state.  No clock: z is a level-sensitive storage node
// and synthesizes to a latch whose enable is "all inputs equal or reset".
// The function of a C-element is standard; the reset input, the default
// width of 4 and the reset value are this design's choices.
module c_element #(
  parameter int unsigned N       = 4,
  parameter bit          RST_VAL = 1'b0
) (
  input  logic [N-1:0] in,
  input  logic         r,
  output logic         z
);

  logic all_one, all_zero;

  assign all_one  = &in;
  assign all_zero = ~|in;

  always_latch begin
    if (r)                    z = RST_VAL;
    else if (all_one)         z = 1'b1;
    else if (all_zero)        z = 1'b0;
  end

endmodule
