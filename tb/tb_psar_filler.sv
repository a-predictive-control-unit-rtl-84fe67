// tb_psar_filler: checks the predictive-step word builder.
// For every di, every index 0..9, every i_min 0..index and random register words,
// the expected output is built bit by bit in the testbench: bits above the index
// and below i_min come from pb, bits i_min+1..index equal di, bit i_min is 1.
module tb_psar_filler;
  logic       di;
  logic [3:0] index_cnt, i_min;
  logic [9:0] pb, filler_out, expct;
  int checks = 0, failures = 0;

  psar_filler #(.N(10), .W(4)) dut (
    .di(di), .index_cnt(index_cnt), .i_min(i_min), .pb(pb), .filler_out(filler_out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++)
      for (int idx = 0; idx < 10; idx++)
        for (int lo = 0; lo <= idx; lo++)
          for (int r = 0; r < 8; r++) begin
            di = d[0]; index_cnt = 4'(idx); i_min = 4'(lo); pb = 10'($urandom);
            expct = pb;
            for (int b = lo + 1; b <= idx; b++) expct[b] = d[0];
            expct[lo] = 1'b1;
            #1;
            checks++;
            if (filler_out !== expct) begin
              failures++;
              $display("FAIL di=%0d idx=%0d imin=%0d pb=%b out=%b exp=%b",
                       d, idx, lo, pb, filler_out, expct);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
