// tb_csk_adder: end-to-end self-check of the carry-skip adder at its default
// size (64 bits, blocks 2,3,4,6,8,9,9,8,6,4,3,2).
//
// Vectors: corner cases (zero, all ones, the carry-in rippling the whole
// width, the longest carry path from the least significant bit of the first
// block to the top), random operands, and random operands in which one
// chosen block is forced to propagate on every bit. The reference is
// WIDTH+1-bit integer addition. The per-block skip outputs are compared with
// the all-propagate condition computed from the operands.
//
// Mechanisms counted, each of which must occur at least once:
//   skip[k]   - block k forwards a carry of 1 around itself (every block),
//   ripple    - a carry generated inside a block leaves through its MUX
//               "if 1" input,
//   full_skip - the carry-in skips every block to the carry-out,
//   cout      - carry-out of 1.
module tb_csk_adder;
  import csk_pkg::*;

  localparam int unsigned NB = NUM_BLOCKS_64;
  localparam int unsigned W  = sum_sizes(SIZES_64, NB);

  logic [W-1:0]  a, b, sum;
  logic          cin, cout;
  logic [NB-1:0] skip;

  int checks = 0, failures = 0;
  int skip_cnt [NB];
  int ripple_cnt = 0, full_skip_cnt = 0, cout_cnt = 0;

  csk_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .skip(skip));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  task automatic apply(logic [W-1:0] va, logic [W-1:0] vb, logic vc);
    logic [W:0]     ref_sum;
    logic [W-1:0]   pvec;
    logic [NB-1:0]  exp_skip;
    logic [NB:0]    carry_into;   // true carry into each block
    int unsigned    lsb, sz;
    a = va;
    b = vb;
    cin = vc;
    #1;
    ref_sum = {1'b0, va} + {1'b0, vb} + {{W{1'b0}}, vc};
    pvec = va ^ vb;
    for (int unsigned k = 0; k < NB; k++) begin
      lsb = block_lsb(SIZES_64, k);
      sz  = SIZES_64[k];
      exp_skip[k] = 1'b1;
      for (int unsigned j = 0; j < sz; j++) exp_skip[k] &= pvec[lsb + j];
      // carry into block k from the reference: bit lsb of (a ^ b ^ sum)
      carry_into[k] = (k == 0) ? vc : (va[lsb] ^ vb[lsb] ^ ref_sum[lsb]);
    end
    carry_into[NB] = ref_sum[W];

    checks += 3;
    if (sum !== ref_sum[W-1:0]) begin
      failures++;
      $display("FAIL sum a=%h b=%h cin=%b sum=%h exp=%h", va, vb, vc, sum, ref_sum[W-1:0]);
    end
    if (cout !== ref_sum[W]) begin
      failures++;
      $display("FAIL cout a=%h b=%h cin=%b cout=%b", va, vb, vc, cout);
    end
    if (skip !== exp_skip) begin
      failures++;
      $display("FAIL skip a=%h b=%h skip=%b exp=%b", va, vb, skip, exp_skip);
    end

    for (int unsigned k = 0; k < NB; k++) begin
      if (exp_skip[k] && carry_into[k]) skip_cnt[k]++;
      if (!exp_skip[k] && carry_into[k+1]) ripple_cnt++;
    end
    if ((&exp_skip) && vc) full_skip_cnt++;
    if (ref_sum[W]) cout_cnt++;
  endtask

  initial begin
    logic [W-1:0] ra, rb;
    int unsigned  k, lsb, sz;
    foreach (skip_cnt[i]) skip_cnt[i] = 0;
    // Start after time 0 so that the first vector is a change of input.
    #1;

    // Corner cases.
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);                 // carry-in skips all blocks
    apply('1, '1, 1'b1);
    apply('1, {{(W-1){1'b0}}, 1'b1}, 1'b0);
    // Longest carry path: generate at bit 0, propagate on every other bit.
    apply({{(W-1){1'b1}}, 1'b1}, {{(W-1){1'b0}}, 1'b1}, 1'b0);
    apply({W{1'b1}} ^ {{(W-1){1'b0}}, 1'b1}, {{(W-1){1'b0}}, 1'b1}, 1'b1);

    // Random operands.
    for (int i = 0; i < 20000; i++)
      apply(rand_word(), rand_word(), 1'($urandom));

    // One block forced to propagate, the rest random.
    for (int i = 0; i < 20000; i++) begin
      ra = rand_word();
      rb = rand_word();
      k   = $urandom_range(NB - 1);
      lsb = block_lsb(SIZES_64, k);
      sz  = SIZES_64[k];
      for (int unsigned j = 0; j < sz; j++) rb[lsb + j] = ~ra[lsb + j];
      apply(ra, rb, 1'($urandom));
    end

    for (int unsigned i = 0; i < NB; i++) begin
      $display("block %0d (%0d bits): carry skipped %0d times", i, SIZES_64[i], skip_cnt[i]);
      if (skip_cnt[i] == 0) begin
        failures++;
        $display("FAIL block %0d never skipped a carry", i);
      end
    end
    $display("rippled-out carries %0d, full-width skips %0d, carry-outs %0d",
             ripple_cnt, full_skip_cnt, cout_cnt);
    if (ripple_cnt == 0)    begin failures++; $display("FAIL no rippled carry"); end
    if (full_skip_cnt == 0) begin failures++; $display("FAIL no full-width skip"); end
    if (cout_cnt == 0)      begin failures++; $display("FAIL no carry-out"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
