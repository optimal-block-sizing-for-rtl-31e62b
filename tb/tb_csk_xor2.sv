// tb_csk_xor2: exhaustive self-check of the two-input XOR against its truth
// table. No clock; a watchdog ends the run if it hangs.
module tb_csk_xor2;
  logic x, y, z;
  int checks = 0, failures = 0;
  localparam bit [3:0] TRUTH = 4'b0110;   // indexed by {x, y}

  csk_xor2 dut (.x(x), .y(y), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int i = 0; i < 4; i++) begin
      {x, y} = 2'(i);
      #1;
      checks++;
      if (z !== TRUTH[i]) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b", x, y, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
