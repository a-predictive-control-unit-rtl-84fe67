// tb_psar_index_counter: random stimulus against a reference model.
// prst, load, enable and data_in are drawn at random each cycle (a full count
// 9..0 is also run first). The reference applies the documented priority
// prst > load > enable, counts down and holds at zero; q and zero_flag are
// compared every cycle.
module tb_psar_index_counter;
  logic       clk = 0, prst, load, enable, zero_flag;
  logic [3:0] data_in, q;
  int         model;
  int checks = 0, failures = 0;

  psar_index_counter #(.W(4), .PRESET(9)) dut (
    .clk(clk), .prst(prst), .load(load), .enable(enable),
    .data_in(data_in), .q(q), .zero_flag(zero_flag));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic p, input logic l, input logic e, input logic [3:0] d);
    prst = p; load = l; enable = e; data_in = d;
    @(posedge clk);
    if (p)               model = 9;
    else if (l)          model = int'(d);
    else if (e && model > 0) model = model - 1;
    #1;
    checks++;
    if (int'(q) != model || zero_flag !== (model == 0)) begin
      failures++;
      $display("FAIL p=%0b l=%0b e=%0b d=%0d q=%0d zf=%0b model=%0d", p, l, e, d, q, zero_flag, model);
    end
  endtask

  initial begin
    model = 0;
    step(1'b1, 1'b0, 1'b0, 4'd3);
    // full count-down 9 -> 0, then two more enables must hold at 0
    repeat (11) step(1'b0, 1'b0, 1'b1, 4'd0);
    step(1'b1, 1'b0, 1'b0, 4'd0);
    for (int n = 0; n < 2000; n++) begin
      step(($urandom % 8) == 0, ($urandom % 4) == 0, $urandom % 2 == 1, 4'($urandom % 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
