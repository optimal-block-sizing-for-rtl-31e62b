// csk_xor2: two-input exclusive-OR.
//
// The ripple cells use this gate twice: once to form the propagate signal
// P = A xor B and once to form the sum S = P xor carry-in. In the original
// CMOS design it is a compact transistor-level XOR that builds the
// complement of Y locally; here only its logic function is kept.
// Interface: x, y in; z = x ^ y out. Purely combinational.
module csk_xor2 (
  input  logic x,
  input  logic y,
  output logic z
);

  always_comb z = x ^ y;

endmodule
