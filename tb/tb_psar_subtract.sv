// tb_psar_subtract: exhaustive check of the 4-bit index subtractor.
// For every pair (a, b) the flag must equal (b > a) and, when no borrow occurs,
// a_b must equal the integer difference a - b.
module tb_psar_subtract;
  logic [3:0] a, b, a_b;
  logic       neg_flag;
  int checks = 0, failures = 0;

  psar_subtract #(.W(4)) dut (.a(a), .b(b), .a_b(a_b), .neg_flag(neg_flag));

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
        if (neg_flag !== (j > i)) begin
          failures++;
          $display("FAIL flag a=%0d b=%0d neg=%0b", i, j, neg_flag);
        end
        if (j <= i) begin
          checks++;
          if (int'(a_b) != i - j) begin
            failures++;
            $display("FAIL diff a=%0d b=%0d a_b=%0d", i, j, a_b);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
