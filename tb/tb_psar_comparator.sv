// tb_psar_comparator: exhaustive check of the 4-bit magnitude comparator.
// Every pair (a, b) of 4-bit values is applied and agtb is compared with a >= b
// computed in the testbench on integers. A watchdog ends the run if it hangs.
module tb_psar_comparator;
  logic [3:0] a, b;
  logic       agtb;
  int checks = 0, failures = 0;

  psar_comparator #(.W(4)) dut (.a(a), .b(b), .agtb(agtb));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (agtb !== (i >= j)) begin
          failures++;
          $display("FAIL a=%0d b=%0d agtb=%0b", i, j, agtb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
