// tb_psar_combi_cntr: checks the prediction rule from the bits of the input.
// For every input code vin (0..1023) and every bit index q (0..9) the testbench
// forms the register state a SAR would have at that step (the bits of vin above
// q, a trial 1 at q), the ideal front-end outputs din = (vin >= vref) and
// cnt = |vin - vref|, and the expected count directly from the bits of vin: the
// length of the run of bits starting at q that equal vin[q], capped at q (1 at
// q = 0). This does not reuse the arithmetic of the block.
module tb_psar_combi_cntr;
  logic [3:0] index_cnt, dif_cnt;
  logic [9:0] cnt;
  logic       din;
  int checks = 0, failures = 0;

  psar_combi_cntr #(.N(10), .W(4)) dut (
    .index_cnt(index_cnt), .cnt(cnt), .din(din), .dif_cnt(dif_cnt));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vref, run, expd;
    logic [9:0] v;
    for (int vin = 0; vin < 1024; vin++) begin
      v = 10'(vin);
      for (int q = 0; q < 10; q++) begin
        vref = ((vin >> (q + 1)) << (q + 1)) + (1 << q);
        din  = (vin >= vref);
        cnt  = 10'(din ? vin - vref : vref - vin);
        index_cnt = 4'(q);
        run = 1;
        for (int b = q - 1; b >= 0; b--) begin
          if (v[b] == v[q]) run++;
          else break;
        end
        expd = (q == 0) ? 1 : (run > q ? q : run);
        #1;
        checks++;
        if (din !== v[q] || int'(dif_cnt) != expd) begin
          failures++;
          $display("FAIL vin=%0d q=%0d din=%0b cnt=%0d dif=%0d exp=%0d", vin, q, din, cnt, dif_cnt, expd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
