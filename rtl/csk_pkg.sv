// csk_pkg: shared types, block-size tables and helper functions for the
// one-level carry-skip adder.
//
// A carry-skip adder is described by the list of its block sizes, least
// significant block first. The list is held in a fixed-length array
// (MAX_BLOCKS entries, unused entries zero) so that a configuration can be
// passed as a single parameter. Three configurations are given:
//   * SIZES_64  - the 64-bit adder sized for 1 um CMOS (the main design),
//   * SIZES_30  - the 30-bit adder sized for 2 um CMOS with a 12 ns budget,
//   * SIZES_18  - the 18-bit illustration of the cell arrangement.
// The three size lists are the published sizings; the fixed-length list
// format and the helper functions are this design's own packaging. The
// functions are constant functions, usable at elaboration time.
package csk_pkg;

  localparam int unsigned MAX_BLOCKS = 16;

  typedef int unsigned size_list_t [MAX_BLOCKS];

  // 64-bit adder, 12 blocks, symmetric about the centre of the adder.
  localparam int unsigned NUM_BLOCKS_64 = 12;
  localparam size_list_t SIZES_64 = '{2, 3, 4, 6, 8, 9, 9, 8, 6, 4, 3, 2,
                                    0, 0, 0, 0};

  // 30-bit adder, 8 blocks; the top block is a single bit.
  localparam int unsigned NUM_BLOCKS_30 = 8;
  localparam size_list_t SIZES_30 = '{2, 4, 5, 6, 6, 4, 2, 1,
                                    0, 0, 0, 0, 0, 0, 0, 0};

  // 18-bit illustration, 6 blocks.
  localparam int unsigned NUM_BLOCKS_18 = 6;
  localparam size_list_t SIZES_18 = '{2, 3, 4, 4, 3, 2,
                                    0, 0, 0, 0, 0, 0, 0, 0, 0, 0};

  // Total number of bit positions in the first n blocks.
  function automatic int unsigned sum_sizes(size_list_t sizes, int unsigned n);
    int unsigned acc = 0;
    for (int unsigned i = 0; i < MAX_BLOCKS; i++)
      if (i < n) acc += sizes[i];
    return acc;
  endfunction

  // Bit position of the least significant bit of block k.
  function automatic int unsigned block_lsb(size_list_t sizes, int unsigned k);
    return sum_sizes(sizes, k);
  endfunction

endpackage
