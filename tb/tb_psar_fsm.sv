// tb_psar_fsm: checks the controller against its state table.
// A reference model holds the expected state; before every clock edge the eight
// outputs are compared with the table (Idle: set_msb, DAC reset; ModeSelect: all
// idle; Normal/Predic: enb_pb, enable_index, loads equal to jump; EOC: eoc) and
// the state is advanced with the table's transitions. A directed conversion of
// ten single-bit steps must give eoc 13 cycles after start is first seen; random
// start/jump/zero-flag stimulus and a mid-run reset follow.
module tb_psar_fsm;
  import psar_pkg::*;
  logic clk = 0, rst_n, start, jump, zeroflagin;
  logic correct_index, enable_index, load_n_index, enb_pb, load_filler, set_msb, rst_dac, eoc;
  psar_state_t state, model;
  int checks = 0, failures = 0;

  psar_fsm dut (
    .clk(clk), .rst_n(rst_n), .start(start), .jump(jump), .zeroflagin(zeroflagin),
    .correct_index(correct_index), .enable_index(enable_index), .load_n_index(load_n_index),
    .enb_pb(enb_pb), .load_filler(load_filler), .set_msb(set_msb), .rst_dac(rst_dac),
    .eoc(eoc), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs, packed {correct_index, enable_index, load_n_index, enb_pb,
  //                          load_filler, set_msb, rst_dac, eoc}
  function automatic logic [7:0] expected(psar_state_t s, logic j);
    case (s)
      ST_IDLE:                expected = 8'b0000_0100;
      ST_MODE_SELECT:         expected = 8'b0000_0010;
      ST_NORMAL, ST_PREDIC:   expected = {1'b0, 1'b1, j, 1'b1, j, 1'b0, 1'b1, 1'b0};
      ST_EOC:                 expected = 8'b0000_0011;
      default:                expected = 8'hxx;
    endcase
  endfunction

  function automatic psar_state_t next_of(psar_state_t s, logic st, logic j, logic z);
    case (s)
      ST_IDLE:              next_of = st ? ST_MODE_SELECT : ST_IDLE;
      ST_MODE_SELECT:       next_of = j ? ST_PREDIC : ST_NORMAL;
      ST_NORMAL, ST_PREDIC: next_of = z ? ST_EOC : (j ? ST_PREDIC : ST_NORMAL);
      default:              next_of = ST_IDLE;
    endcase
  endfunction

  task automatic cycle(input logic st, input logic j, input logic z);
    @(negedge clk);
    start = st; jump = j; zeroflagin = z;
    #1;
    checks++;
    if ({correct_index, enable_index, load_n_index, enb_pb, load_filler, set_msb, rst_dac, eoc}
        !== expected(model, j) || state !== model) begin
      failures++;
      $display("FAIL state=%s model=%s j=%0b outs=%b exp=%b", state.name(), model.name(), j,
               {correct_index, enable_index, load_n_index, enb_pb, load_filler, set_msb, rst_dac, eoc},
               expected(model, j));
    end
    @(posedge clk);
    model = next_of(model, st, j, z);
  endtask

  initial begin
    int n_cyc;
    start = 0; jump = 0; zeroflagin = 0;
    rst_n = 0; model = ST_IDLE;
    #12 rst_n = 1;
    // directed: a standard conversion, ten single-bit steps
    cycle(0, 0, 0);
    n_cyc = 0;
    cycle(1, 0, 0); n_cyc++;                 // Idle sees start
    cycle(0, 0, 0); n_cyc++;                 // ModeSelect
    for (int k = 9; k >= 0; k--) begin       // steps for index 9..0
      cycle(0, 0, k == 0); n_cyc++;
    end
    #1;
    checks++;
    if (eoc !== 1'b1 || state !== ST_EOC) begin
      failures++;
      $display("FAIL no EOC after a standard conversion");
    end
    cycle(0, 0, 0); n_cyc++;                 // EOC
    checks++;
    if (n_cyc != 13) begin
      failures++;
      $display("FAIL standard conversion took %0d cycles", n_cyc);
    end
    // random stimulus
    for (int n = 0; n < 5000; n++) begin
      cycle(($urandom % 3) == 0, 1'($urandom), ($urandom % 6) == 0);
      if (n == 2500) begin
        @(negedge clk) rst_n = 0;
        model = ST_IDLE;
        #1 checks++;
        if (state !== ST_IDLE) begin failures++; $display("FAIL reset"); end
        @(negedge clk) rst_n = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
