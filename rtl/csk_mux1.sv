// csk_mux1: MUX1, the non-inverting skip multiplexer.
//
// An ordinary one-select-line multiplexer: y = sel ? in1 : in0. In the adder
// it closes an even-sized block, where the rippled carry leaves the block
// with the same polarity the block carry-in had; in0 ("if 0") is the block
// carry-in (the skip path) and in1 ("if 1") the carry rippled through the
// block. The function and the input roles follow the published circuit (a
// pass-gate multiplexer with a two-inverter output stage); only the logic is
// modelled. Interface: sel, in0, in1 in; y out. Combinational.
module csk_mux1 (
  input  logic sel,
  input  logic in0,
  input  logic in1,
  output logic y
);

  always_comb y = sel ? in1 : in0;

endmodule
