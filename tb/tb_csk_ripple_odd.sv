// tb_csk_ripple_odd: exhaustive self-check of the odd ripple cell, whose
// inputs are complemented. Expected values come from integer addition of
// the true-polarity values.
module tb_csk_ripple_odd;
  logic a_n, b_n, c_in_n, p, c_in, s, c_out;
  int checks = 0, failures = 0;

  csk_ripple_odd dut (.a_n(a_n), .b_n(b_n), .c_in_n(c_in_n), .p(p),
                      .c_in(c_in), .s(s), .c_out(c_out));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a_n=%b b_n=%b c_in_n=%b got=%b exp=%b",
               what, a_n, b_n, c_in_n, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ta, tb_, tc, total;
    #1;
    for (int i = 0; i < 8; i++) begin
      {a_n, b_n, c_in_n} = 3'(i);
      #1;
      ta = (a_n == 1'b0) ? 1 : 0;
      tb_ = (b_n == 1'b0) ? 1 : 0;
      tc = (c_in_n == 1'b0) ? 1 : 0;
      total = ta + tb_ + tc;
      check("s",     s,     logic'(total % 2));
      check("c_out", c_out, logic'(total >= 2));
      check("p",     p,     logic'(ta + tb_ == 1));
      check("c_in",  c_in,  logic'(tc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
