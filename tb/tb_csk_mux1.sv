// tb_csk_mux1: exhaustive self-check of MUX1 (y = sel ? in1 : in0).
module tb_csk_mux1;
  logic sel, in0, in1, y;
  int checks = 0, failures = 0;

  csk_mux1 dut (.sel(sel), .in0(in0), .in1(in1), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_y;
    #1;
    for (int i = 0; i < 8; i++) begin
      {sel, in0, in1} = 3'(i);
      #1;
      // "if 0" input when select is 0, "if 1" input when select is 1.
      if (sel == 1'b0) exp_y = in0;
      else             exp_y = in1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL sel=%b in0=%b in1=%b y=%b", sel, in0, in1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
