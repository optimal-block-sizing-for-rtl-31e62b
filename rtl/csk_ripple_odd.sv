// csk_ripple_odd: the "odd" ripple cell (full adder) of the carry-skip adder.
//
// The odd cell is the dual of the even cell: it takes complemented operand
// bits and a complemented carry-in, and delivers its carry-out in true
// polarity, ready for the even cell at the next position. Because every cell
// inverts its carry, no inverter is needed between cells on the carry path.
// P = A-bar xor B-bar (equal to A xor B). When P = 1 the inverted
// (complemented) carry-in is passed on, giving the true carry; when P = 0
// the carry-out is taken from the operand bits (both A-bar and B-bar 0 is a
// generate, both 1 a kill). S = P xor carry-in, with the true carry-in made
// by inverting c_in_n and also exported as a tap. As for the even cell, the
// ports follow the published circuit and the carry node is written as a 2:1
// selection.
// Interface: a_n, b_n, c_in_n in; p, c_in, s, c_out out. Combinational.
module csk_ripple_odd (
  input  logic a_n,
  input  logic b_n,
  input  logic c_in_n,
  output logic p,
  output logic c_in,
  output logic s,
  output logic c_out
);

  logic c_true;

  always_comb c_true = ~c_in_n;

  csk_xor2 u_xp (.x(a_n), .y(b_n),    .z(p));
  csk_xor2 u_xs (.x(p),   .y(c_true), .z(s));

  always_comb begin
    c_in  = c_true;
    c_out = p ? ~c_in_n : ~a_n;
  end

endmodule
