// pl_counter2: phased logic netlist of a 2-bit binary counter.
//
// The clocked counter has two DFFs, an inverter (d0 = ~q0) and an XOR
// (d1 = q0 ^ q1).  In the phased logic version every gate becomes a pl4gate:
//
//   G1  buffer, replaces DFF0   input  G2                  output -> G2, G4
//   G2  inverter               input  G1                  output -> G1
//   G3  buffer, replaces DFF1   input  G4                  output -> G4
//   G4  XOR                    inputs G1, G3              output -> G3
//   fb  feedback net G4 -> G1 (G1's output to G4 is not otherwise on a loop
//       through G1, so G1 must wait for G4 before producing the next q0)
//
// G1 and G3 drive their nets from the inverted-phase output (y_inv), so
// after reset those nets carry a token and each loop G1-G2, G1-G4 (via fb)
// and G3-G4 has exactly one gate ready to fire: G2 and G4 first, then G1
// and G3, and so on.  Each full cycle of firings is one count; q0/q1 are the
// value rails of G1/G3, i.e. the counter state.
//
// The nets between gates leave the module on the *_o ports and come back on
// the *_i ports.  A phased logic netlist only runs if the loops through it
// contain delay, and is insensitive to how much: in silicon that is the
// routing, here it is whatever connects *_o to *_i outside (in simulation a
// delayed assignment; any positive delays give the same count sequence).
//   n1_o  G1 output  -> g2_a_i, g4_a_i
//   n2_o  G2 output  -> g1_a_i
//   n3_o  G3 output  -> g4_b_i
//   n4_o  G4 output  -> g3_a_i
//   fb_o  G4 fo      -> g1_fi_i
// gate_phase/enable expose each gate's phase and output latch enable.
// r is an active-high reset (gates even, counter 0).  protect selects the
// "A" (1) or "B" (0) LUT configuration in all four gates.  Unused gate
// inputs carry value 0 in the gate's own phase; unused feedback inputs are
// tied to the gate's own phase, so neither ever blocks a firing.
//
// Lint reports latches and loops inside each gate (see pl4gate); no loop
// crosses between gates inside this module, because every net between
// gates goes out through the ports.
//
// The netlist, the inverted-phase outputs on G1/G3 and the feedback net
// follow the source example; bringing the nets out as ports and the tie-off
// of unused pins are this design's choices.
module pl_counter2
  import pl_pkg::*;
(
  input  logic        r,
  input  logic        protect,
  // nets leaving the gates
  output ledr_t       n1_o,
  output ledr_t       n2_o,
  output ledr_t       n3_o,
  output ledr_t       n4_o,
  output logic        fb_o,
  // the same nets arriving at the gate inputs
  input  ledr_t       g1_a_i,
  input  logic        g1_fi_i,
  input  ledr_t       g2_a_i,
  input  ledr_t       g3_a_i,
  input  ledr_t       g4_a_i,
  input  ledr_t       g4_b_i,
  // observation
  output logic        q0,
  output logic        q1,
  output logic [3:0]  gate_phase,
  output logic [3:0]  enable
);

  localparam logic [15:0] LUT_BUF = 16'hAAAA;  // y = a
  localparam logic [15:0] LUT_INV = 16'h5555;  // y = ~a
  localparam logic [15:0] LUT_XOR = 16'h6666;  // y = a ^ b

  ledr_t y1, y2, y3, y4;
  ledr_t y1_inv, y3_inv;
  logic  fo4;
  logic  fob1, fob2, fob3, fob4;

  // An unused LEDR input: value 0 in the gate's own phase.
  function automatic ledr_t idle_in(logic own_phase);
    return ledr_encode(1'b0, own_phase);
  endfunction

  // G1: buffer (DFF0), waits for the feedback from G4.
  pl4gate g1 (
    .a(g1_a_i), .b(idle_in(fob1)), .c(idle_in(fob1)), .d(idle_in(fob1)),
    .fi(g1_fi_i), .r(r), .init(LUT_BUF), .protect(protect),
    .v_rbit(1'b0), .t_rbit(1'b1),
    .y(y1), .y_inv(y1_inv), .fo(), .fo_b(fob1),
    .gate_phase(gate_phase[0]), .enable(enable[0])
  );

  // G2: inverter.
  pl4gate g2 (
    .a(g2_a_i), .b(idle_in(fob2)), .c(idle_in(fob2)), .d(idle_in(fob2)),
    .fi(fob2), .r(r), .init(LUT_INV), .protect(protect),
    .v_rbit(1'b1), .t_rbit(1'b0),
    .y(y2), .y_inv(), .fo(), .fo_b(fob2),
    .gate_phase(gate_phase[1]), .enable(enable[1])
  );

  // G3: buffer (DFF1).
  pl4gate g3 (
    .a(g3_a_i), .b(idle_in(fob3)), .c(idle_in(fob3)), .d(idle_in(fob3)),
    .fi(fob3), .r(r), .init(LUT_BUF), .protect(protect),
    .v_rbit(1'b0), .t_rbit(1'b1),
    .y(y3), .y_inv(y3_inv), .fo(), .fo_b(fob3),
    .gate_phase(gate_phase[2]), .enable(enable[2])
  );

  // G4: XOR of q0 and q1, source of the feedback net to G1.
  pl4gate g4 (
    .a(g4_a_i), .b(g4_b_i), .c(idle_in(fob4)), .d(idle_in(fob4)),
    .fi(fob4), .r(r), .init(LUT_XOR), .protect(protect),
    .v_rbit(1'b0), .t_rbit(1'b1),
    .y(y4), .y_inv(), .fo(fo4), .fo_b(fob4),
    .gate_phase(gate_phase[3]), .enable(enable[3])
  );

  assign n1_o = y1_inv;
  assign n2_o = y2;
  assign n3_o = y3_inv;
  assign n4_o = y4;
  assign fb_o = fo4;

  assign q0 = y1.v;
  assign q1 = y3.v;

endmodule
