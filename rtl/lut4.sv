// lut4: compute element of the PL gate, a 4-input look-up table with an
// optional input hold.
//
// new_v = init[{d,c,b,a}], a standard programmable LUT4.  The value inputs
// pass through level-sensitive hold latches.  With protect = 0 (the "B"
// configuration) the latches are always transparent and the LUT follows
// every change of its value inputs.  With protect = 1 (the "A"
// configuration) the latches are transparent only while the gate's output
// latch enable is high, so value changes that arrive before all input
// phases have matched never reach the LUT and cause no LUT switching.
//
// Interface: init[15:0] LUT contents (bit i is the output for input index
// i = {d,c,b,a}); a..d value rails; protect configuration bit; en the output
// latch enable of the gate; r reset, which makes the hold latches
// transparent so the LUT shows the function of the reset inputs.
// Timing: no clock; combinational from the hold latches to new_v.
//
// The LUT4 and the option of using the output latch gate signal as a LUT
// enable, selected by a configuration bit, follow the source description.
// Placing the hold latches on the LUT inputs is this design's choice.
module lut4 (
  input  logic [15:0] init,
  input  logic        a,
  input  logic        b,
  input  logic        c,
  input  logic        d,
  input  logic        protect,
  input  logic        en,
  input  logic        r,
  output logic        new_v
);

  logic [3:0] idx_in, idx_q;
  logic       open_q;

  assign idx_in = {d, c, b, a};
  assign open_q = ~protect | en | r;

  always_latch begin
    if (open_q) idx_q = idx_in;
  end

  assign new_v = init[idx_q];

endmodule
