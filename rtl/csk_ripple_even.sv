// csk_ripple_even: the "even" ripple cell (full adder) of the carry-skip adder.
//
// Bit positions alternate between even and odd cells. The even cell takes
// the operand bits and the carry in true polarity and delivers its carry-out
// complemented, which is what the odd cell at the next position expects.
// Inside, P = A xor B. When P = 1 the cell passes the inverted carry-in to
// its carry-out node (an inverting pass gate in CMOS); when P = 0 the two
// operand bits are equal and the carry-out node is driven from them
// directly: both 1 is a generate (carry-out complemented = 0), both 0 a kill
// (carry-out complemented = 1). S = P xor carry-in. P is also exported, for
// the block's skip detection, as is a buffered complemented copy of the
// carry-in. The cell's ports and function follow the published transistor
// circuit; writing the carry node as a 2:1 selection instead of a tristate
// and a transistor stack is this design's choice.
// Interface: a, b, c_in in; p, c_in_n, s, c_out_n out. Combinational.
module csk_ripple_even (
  input  logic a,
  input  logic b,
  input  logic c_in,
  output logic p,
  output logic c_in_n,
  output logic s,
  output logic c_out_n
);

  csk_xor2 u_xp (.x(a), .y(b),    .z(p));
  csk_xor2 u_xs (.x(p), .y(c_in), .z(s));

  always_comb begin
    c_in_n  = ~c_in;
    // Propagate: pass the inverted carry. Otherwise a == b: generate or kill.
    c_out_n = p ? ~c_in : ~a;
  end

endmodule
