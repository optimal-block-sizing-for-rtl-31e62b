// csk_skip_block: one block of a one-level carry-skip adder.
//
// A block is WIDTH ripple cells in series plus a skip multiplexer. Cells
// alternate even/odd by absolute bit position (bit 0 of the adder is an
// even cell); LSB_ODD gives the parity of this block's first bit. Since every
// cell inverts its carry, the carry on a wire is in true polarity when it
// enters an even cell and complemented when it enters an odd cell. c_in and
// c_out follow that rule for the block's first bit and for the bit after the
// block.
//
// The select line of the multiplexer is low exactly when every cell of the
// block propagates (all P = 1). The multiplexer then forwards the block
// carry-in ("if 0" input) and the carry skips the block; otherwise it
// forwards the carry rippled through the cells ("if 1" input), which in that
// case was generated or killed inside the block and does not depend on
// c_in. An even-sized block keeps the carry polarity and uses MUX1; an
// odd-sized block flips it and uses MUX2, which inverts the skipped carry.
// The odd cells take complemented operand bits, made here by inverters.
//
// Interface: a, b (WIDTH bits, true polarity), c_in; s (WIDTH sum bits),
// c_out, and skip (1 when the block carry-in is forwarded; an observation
// output added by this design). Purely combinational.
module csk_skip_block #(
  parameter int unsigned WIDTH   = 4,
  parameter bit          LSB_ODD = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c_in,
  output logic [WIDTH-1:0] s,
  output logic             c_out,
  output logic             skip
);

  // Carry into cell j, in the polarity cell j expects; c[WIDTH] is the
  // rippled carry leaving the last cell.
  logic [WIDTH:0]   c;
  logic [WIDTH-1:0] p;
  logic [WIDTH-1:0] c_tap;   // carry-in taps of the cells (unused here)
  logic             sel;

  assign c[0] = c_in;

  for (genvar j = 0; j < WIDTH; j++) begin : g_cell
    if (((j % 2) == 1) ^ LSB_ODD) begin : g_odd
      csk_ripple_odd u_cell (
        .a_n   (~a[j]),
        .b_n   (~b[j]),
        .c_in_n(c[j]),
        .p     (p[j]),
        .c_in  (c_tap[j]),
        .s     (s[j]),
        .c_out (c[j+1])
      );
    end else begin : g_even
      csk_ripple_even u_cell (
        .a      (a[j]),
        .b      (b[j]),
        .c_in   (c[j]),
        .p      (p[j]),
        .c_in_n (c_tap[j]),
        .s      (s[j]),
        .c_out_n(c[j+1])
      );
    end
  end

  always_comb begin
    sel  = ~(&p);
    skip = ~sel;
  end

  if ((WIDTH % 2) == 0) begin : g_mux1
    csk_mux1 u_mux (.sel(sel), .in0(c_in), .in1(c[WIDTH]), .y(c_out));
  end else begin : g_mux2
    csk_mux2 u_mux (.sel(sel), .in0(c_in), .in1(c[WIDTH]), .y(c_out));
  end

endmodule
