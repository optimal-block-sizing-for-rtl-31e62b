// tb_csk_sizing: checks the block sizes built into the adder against the
// sizing procedure and the delay figures published with them.
//
//  1. 2 um model, budget 12 ns: the procedure must build the 30-bit adder
//     2,4,5,6,6,4,2,1; its worst carry delay is 11.80 ns and its carry-out
//     path 12.09 ns.
//  2. 1 um model, budget 5.78 ns: the procedure must build the 64-bit adder
//     2,3,4,6,8,9,9,8,6,4,3,2 (the adder's default), with the per-block
//     delays to and from the centre of the adder that annotate that sizing.
//  3. Bisection: the fastest 64-bit adder under the 1 um model must have a
//     carry delay of at most 5.78 ns, and the procedure must fall short of
//     64 bits 1 ps below it.
//  4. The default csk_adder, driven with the longest-path vector, still adds
//     correctly (a functional tie between the sizing and the RTL).
module tb_csk_sizing;
  import csk_pkg::*;
  import csk_sizing_pkg::*;

  int checks = 0, failures = 0;

  logic [63:0] a, b, sum;
  logic        cin, cout;
  logic [11:0] skip;

  csk_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .skip(skip));

  task automatic check_int(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    size_list_t  s;
    int unsigned n, d, lsb_to_center, center_to_msb;
    int unsigned pub_to_centre [6]  = '{3000, 2960, 2700, 2840, 2980, 2940};
    int unsigned pub_from_centre [6] = '{2720, 2760, 2620, 2480, 2740, 2780};

    // 1. 30-bit adder at 2 um.
    procedure_p(12000, DM_2UM, s, n);
    check_int("2um blocks", n, NUM_BLOCKS_30);
    for (int unsigned i = 0; i < NUM_BLOCKS_30; i++)
      check_int($sformatf("2um block %0d size", i), s[i], SIZES_30[i]);
    check_int("2um bits", sum_sizes(s, n), 30);
    check_int("2um worst carry delay", worst_delay(SIZES_30, NUM_BLOCKS_30, DM_2UM), 11800);
    check_int("2um carry-out delay", cout_delay(SIZES_30, NUM_BLOCKS_30, DM_2UM), 12090);
    $display("2 um, d = 12 ns: %0d bits in %0d blocks", sum_sizes(s, n), n);

    // 2. 64-bit adder at 1 um.
    procedure_p(5780, DM_1UM, s, n);
    check_int("1um blocks", n, NUM_BLOCKS_64);
    for (int unsigned i = 0; i < NUM_BLOCKS_64; i++)
      check_int($sformatf("1um block %0d size", i), s[i], SIZES_64[i]);
    check_int("1um worst carry delay", worst_delay(SIZES_64, NUM_BLOCKS_64, DM_1UM), 5780);
    for (int unsigned i = 0; i < 6; i++) begin
      lsb_to_center = src_delay(SIZES_64[i], DM_1UM) + (5 - i) * DM_1UM.mux;
      center_to_msb = i * DM_1UM.mux + sink_delay(SIZES_64[6 + i], DM_1UM);
      check_int($sformatf("block %0d lsb to centre", i), lsb_to_center, pub_to_centre[i]);
      check_int($sformatf("block %0d centre to msb", 6 + i), center_to_msb, pub_from_centre[i]);
    end
    check_int("carry-in to centre", 6 * DM_1UM.mux, 2640);
    $display("1 um, d = 5.78 ns: %0d bits in %0d blocks", sum_sizes(s, n), n);

    // 3. Bisection for the fastest 64-bit adder.
    d = min_delay(64, DM_1UM);
    $display("fastest 64-bit adder at 1 um: carry delay %0d ps", d);
    checks++;
    if (d > 5780) begin
      failures++;
      $display("FAIL bisection gave %0d ps, above 5780", d);
    end
    procedure_p(d - 1, DM_1UM, s, n);
    checks++;
    if (sum_sizes(s, n) >= 64) begin
      failures++;
      $display("FAIL %0d ps below the minimum still gives %0d bits", 1, sum_sizes(s, n));
    end

    // 4. Longest carry path through the default adder.
    a = 64'hFFFF_FFFF_FFFF_FFFF;
    b = 64'h0000_0000_0000_0001;
    cin = 1'b0;
    #2;
    checks++;
    if (sum !== 64'h0 || cout !== 1'b1 || skip !== 12'b1111_1111_1110) begin
      failures++;
      $display("FAIL longest path: sum=%h cout=%b skip=%b", sum, cout, skip);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
