// tb_psar_pbr: random stimulus against a reference model of the register.
// Each cycle draws set_msb, enb_pb, load_filler, din, index and a filler word.
// The reference: set_msb loads the MSB-only word; enb_pb with load_filler loads the
// filler word; enb_pb alone writes din at the index and a trial 1 just below it
// (none at index 0). An asynchronous reset in mid-run must clear the register.
module tb_psar_pbr;
  logic       clk = 0, rst_n, din, set_msb, enb_pb, load_filler;
  logic [3:0] index_cnt;
  logic [9:0] filler, pb, model;
  int checks = 0, failures = 0;

  psar_pbr #(.N(10), .W(4)) dut (
    .clk(clk), .rst_n(rst_n), .index_cnt(index_cnt), .filler(filler), .din(din),
    .set_msb(set_msb), .enb_pb(enb_pb), .load_filler(load_filler), .pb(pb));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    checks++;
    if (pb !== model) begin
      failures++;
      $display("FAIL %s pb=%b model=%b", what, pb, model);
    end
  endtask

  initial begin
    set_msb = 0; enb_pb = 0; load_filler = 0; din = 0; index_cnt = 0; filler = '0;
    rst_n = 0; model = '0;
    #12 compare("reset");
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      set_msb     = ($urandom % 10) == 0;
      enb_pb      = ($urandom % 4) != 0;
      load_filler = ($urandom % 3) == 0;
      din         = 1'($urandom);
      index_cnt   = 4'($urandom % 10);
      filler      = 10'($urandom);
      @(posedge clk);
      if (set_msb) model = 10'b10_0000_0000;
      else if (enb_pb && load_filler) model = filler;
      else if (enb_pb) begin
        model[index_cnt] = din;
        if (index_cnt > 0) model[index_cnt - 1] = 1'b1;
      end
      #1 compare("step");
      if (n == 1500) begin
        rst_n = 0; model = '0; set_msb = 0; enb_pb = 0;
        #1 compare("async reset");
        @(negedge clk) rst_n = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
