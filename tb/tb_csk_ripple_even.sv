// tb_csk_ripple_even: exhaustive self-check of the even ripple cell.
// Expected values come from integer addition: a + b + c_in = 2*carry + sum.
module tb_csk_ripple_even;
  logic a, b, c_in, p, c_in_n, s, c_out_n;
  int checks = 0, failures = 0;

  csk_ripple_even dut (.a(a), .b(b), .c_in(c_in), .p(p), .c_in_n(c_in_n),
                       .s(s), .c_out_n(c_out_n));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%b b=%b c_in=%b got=%b exp=%b", what, a, b, c_in, got, exp);
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
    int total;
    #1;
    for (int i = 0; i < 8; i++) begin
      {a, b, c_in} = 3'(i);
      #1;
      total = int'(a) + int'(b) + int'(c_in);
      check("s",       s,       logic'(total % 2));
      check("c_out_n", c_out_n, logic'(total < 2));
      check("p",       p,       logic'(int'(a) + int'(b) == 1));
      check("c_in_n",  c_in_n,  logic'(c_in == 1'b0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
