// tb_csk_adder_configs: self-check of the carry-skip adder in its two other
// published sizings, the 30-bit adder (blocks 2,4,5,6,6,4,2,1) and the
// 18-bit arrangement (blocks 2,3,4,4,3,2). Both contain odd-sized blocks
// (MUX2) and blocks starting on odd bit positions, and the 30-bit one ends
// with a single-bit block. Random operands, operands with one block forced to
// propagate, and corner cases are compared with integer addition; every
// block must skip a carry at least once.
module tb_csk_adder_configs;
  import csk_pkg::*;

  int checks = 0, failures = 0, done = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int unsigned NB    = (g == 0) ? NUM_BLOCKS_30 : NUM_BLOCKS_18;
    localparam size_list_t  SIZES = (g == 0) ? SIZES_30 : SIZES_18;
    localparam int unsigned W     = sum_sizes(SIZES, NB);

    logic [W-1:0]  a, b, sum;
    logic          cin, cout;
    logic [NB-1:0] skip;
    int            skip_cnt [NB];

    csk_adder #(.NUM_BLOCKS(NB), .BLOCK_SIZES(SIZES), .WIDTH(W)) dut (
      .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .skip(skip));

    task automatic apply(logic [W-1:0] va, logic [W-1:0] vb, logic vc);
      logic [W:0] ref_sum;
      logic       all_p, c_into;
      int unsigned lsb;
      a = va;
      b = vb;
      cin = vc;
      #1;
      ref_sum = {1'b0, va} + {1'b0, vb} + {{W{1'b0}}, vc};
      checks += 2;
      if (sum !== ref_sum[W-1:0] || cout !== ref_sum[W]) begin
        failures++;
        $display("FAIL W=%0d a=%h b=%h cin=%b sum=%h cout=%b", W, va, vb, vc, sum, cout);
      end
      for (int unsigned k = 0; k < NB; k++) begin
        lsb = block_lsb(SIZES, k);
        all_p = 1'b1;
        for (int unsigned j = 0; j < SIZES[k]; j++) all_p &= va[lsb + j] ^ vb[lsb + j];
        c_into = (k == 0) ? vc : (va[lsb] ^ vb[lsb] ^ ref_sum[lsb]);
        checks++;
        if (skip[k] !== all_p) begin
          failures++;
          $display("FAIL W=%0d skip[%0d]=%b", W, k, skip[k]);
        end
        if (all_p && c_into) skip_cnt[k]++;
      end
    endtask

    initial begin
      logic [W-1:0] ra, rb;
      int unsigned  k, lsb;
      foreach (skip_cnt[i]) skip_cnt[i] = 0;
      // Start after time 0 so that the first vector is a change of input.
      #(1 + g * 5);
      apply('0, '0, 1'b0);
      apply('1, '0, 1'b1);
      apply('1, '1, 1'b1);
      apply({W{1'b1}} ^ {{(W-1){1'b0}}, 1'b1}, {{(W-1){1'b0}}, 1'b1}, 1'b1);
      for (int i = 0; i < 20000; i++) begin
        ra = W'({$urandom, $urandom});
        rb = W'({$urandom, $urandom});
        if (i % 2 == 1) begin
          k   = $urandom_range(NB - 1);
          lsb = block_lsb(SIZES, k);
          for (int unsigned j = 0; j < SIZES[k]; j++) rb[lsb + j] = ~ra[lsb + j];
        end
        apply(ra, rb, 1'($urandom));
      end
      for (int unsigned i = 0; i < NB; i++)
        if (skip_cnt[i] == 0) begin
          failures++;
          $display("FAIL W=%0d block %0d never skipped a carry", W, i);
        end
      $display("%0d-bit adder done", W);
      done++;
    end
  end

  initial begin
    wait (done == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
