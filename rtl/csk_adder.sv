// csk_adder: one-level carry-skip adder with unequal, optimised block sizes.
//
// The operand bits are cut into NUM_BLOCKS blocks (sizes in BLOCK_SIZES,
// least significant block first). Inside a block the carry ripples through
// alternating even/odd inverting cells; at the end of each block a
// multiplexer either takes the rippled carry or, when every bit of the
// block propagates, skips the block by forwarding the block's carry-in. The
// worst carry path therefore ripples through the first block in which it is
// generated, skips the blocks in between, and ripples into the block where
// it is absorbed. Small blocks at both ends and large blocks in the middle
// balance those paths; the default sizes 2,3,4,6,8,9,9,8,6,4,3,2 are the
// 64-bit sizing for 1 um CMOS (worst carry path 5.78 ns, 6.23 ns add time in
// that process). Other sizings, such as csk_pkg::SIZES_30 (30 bits) or
// csk_pkg::SIZES_18 (18 bits), are selected by parameters.
//
// The carry on the wire between blocks is true for an even bit position and
// complemented for an odd one; the carry-out is turned to true polarity if
// WIDTH is odd. The cell circuits, the multiplexers and the sizes follow the
// published design; the packaging as parameters, the inversion of the
// operands for odd cells and the skip observation output are this design's
// choices.
//
// Interface: a, b (WIDTH bits), cin; sum (WIDTH bits), cout, and skip
// (one bit per block: 1 when that block's multiplexer forwards the block
// carry-in). Purely combinational: no clock, no reset, no latency in cycles.
module csk_adder
  import csk_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS  = NUM_BLOCKS_64,
  parameter size_list_t  BLOCK_SIZES = SIZES_64,
  parameter int unsigned WIDTH       = sum_sizes(BLOCK_SIZES, NUM_BLOCKS)
) (
  input  logic [WIDTH-1:0]      a,
  input  logic [WIDTH-1:0]      b,
  input  logic                  cin,
  output logic [WIDTH-1:0]      sum,
  output logic                  cout,
  output logic [NUM_BLOCKS-1:0] skip
);

  // Elaboration checks on the configuration.
  if (NUM_BLOCKS == 0 || NUM_BLOCKS > MAX_BLOCKS) begin : g_bad_count
    $error("csk_adder: NUM_BLOCKS must be 1..%0d", MAX_BLOCKS);
  end
  if (WIDTH != sum_sizes(BLOCK_SIZES, NUM_BLOCKS)) begin : g_bad_width
    $error("csk_adder: WIDTH must equal the sum of BLOCK_SIZES");
  end

  // Carry into block k (polarity of bit block_lsb(k)); bc[NUM_BLOCKS] is the
  // carry out of the last block.
  logic [NUM_BLOCKS:0] bc;

  assign bc[0] = cin;   // bit 0 is an even cell: true polarity

  for (genvar k = 0; k < NUM_BLOCKS; k++) begin : g_blk
    localparam int unsigned LSB = block_lsb(BLOCK_SIZES, k);
    localparam int unsigned W   = BLOCK_SIZES[k];

    csk_skip_block #(
      .WIDTH  (W),
      .LSB_ODD(1'((LSB % 2) == 1))
    ) u_blk (
      .a    (a[LSB +: W]),
      .b    (b[LSB +: W]),
      .c_in (bc[k]),
      .s    (sum[LSB +: W]),
      .c_out(bc[k+1]),
      .skip (skip[k])
    );
  end

  // The wire after bit WIDTH-1 is complemented when WIDTH is odd.
  always_comb cout = ((WIDTH % 2) == 1) ? ~bc[NUM_BLOCKS] : bc[NUM_BLOCKS];

endmodule
