// csk_mux2: MUX2, the skip multiplexer that inverts its "if 0" input.
//
// y = sel ? in1 : ~in0. It closes an odd-sized block: the carry rippled
// through an odd number of inverting cells leaves the block with the
// opposite polarity from the block carry-in, so the skipped carry on in0 is
// inverted to match the rippled carry on in1. Which input is inverted
// follows from that polarity rule; the inverter placement is this design's
// reading. Interface: sel, in0, in1 in; y out. Combinational.
module csk_mux2 (
  input  logic sel,
  input  logic in0,
  input  logic in1,
  output logic y
);

  always_comb y = sel ? in1 : ~in0;

endmodule
