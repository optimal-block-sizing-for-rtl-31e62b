// tb_csk_skip_block: self-check of single carry-skip blocks.
//
// Fourteen blocks are instantiated: widths 1, 2, 3, 4, 5, 8 and 9, each
// starting on an even and on an odd bit position, so that both MUX1 and MUX2
// and both carry polarities are exercised. Widths up to 5 are tested
// exhaustively, wider ones with random vectors plus forced all-propagate
// vectors. The reference is integer addition; the carry polarity on the
// input and output wires is derived from the bit-position parity. Each block
// must take the skip path with a carry of 1 at least once.
module tb_csk_skip_block;
  localparam int NCFG = 14;
  localparam int WIDTHS [7] = '{1, 2, 3, 4, 5, 8, 9};

  int checks = 0, failures = 0, done = 0;
  int skips_taken [NCFG];

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int  W   = WIDTHS[g / 2];
    localparam bit  ODD = (g % 2) == 1;
    localparam bit  OUT_ODD = ODD ^ ((W % 2) == 1);

    logic [W-1:0] a, b, s;
    logic         c_in, c_out, skip;

    csk_skip_block #(.WIDTH(W), .LSB_ODD(ODD)) dut (
      .a(a), .b(b), .c_in(c_in), .s(s), .c_out(c_out), .skip(skip));

    task automatic apply(logic [W-1:0] va, logic [W-1:0] vb, logic carry);
      longint unsigned total;
      logic exp_carry, exp_skip;
      a = va;
      b = vb;
      c_in = ODD ? ~carry : carry;
      #1;
      total = longint'(va) + longint'(vb) + longint'(carry);
      exp_carry = total[W];
      exp_skip  = ((va ^ vb) == {W{1'b1}});
      checks += 3;
      if (s !== total[W-1:0]) begin
        failures++;
        $display("FAIL W=%0d odd=%0d sum a=%h b=%h c=%b s=%h", W, ODD, va, vb, carry, s);
      end
      if (c_out !== (OUT_ODD ? ~exp_carry : exp_carry)) begin
        failures++;
        $display("FAIL W=%0d odd=%0d carry a=%h b=%h c=%b c_out=%b", W, ODD, va, vb, carry, c_out);
      end
      if (skip !== exp_skip) begin
        failures++;
        $display("FAIL W=%0d odd=%0d skip a=%h b=%h skip=%b", W, ODD, va, vb, skip);
      end
      if (exp_skip && carry) skips_taken[g]++;
    endtask

    initial begin
      logic [W-1:0] ra, rb;
      skips_taken[g] = 0;
      #(1 + g * 10);
      if (W <= 5) begin
        for (int i = 0; i < (1 << (2 * W + 1)); i++)
          apply(W'(i >> (W + 1)), W'(i >> 1), i[0]);
      end else begin
        for (int i = 0; i < 3000; i++) begin
          ra = W'({$urandom, $urandom});
          rb = W'({$urandom, $urandom});
          // Every fourth vector makes every bit propagate.
          if (i % 4 == 0) rb = ~ra;
          apply(ra, rb, 1'($urandom));
        end
      end
      if (skips_taken[g] == 0) begin
        failures++;
        $display("FAIL W=%0d odd=%0d never skipped a carry", W, ODD);
      end
      done++;
    end
  end

  initial begin
    wait (done == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
