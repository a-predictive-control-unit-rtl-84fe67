// tb_psar_top: end-to-end test of the predictive SAR control unit.
//
// The testbench stands in for the analog front end with an ideal model: the held
// input is an integer code vin (0..1023); in every cycle the comparison result is
// din = (vin >= pb) and the measured difference is cnt = |vin - pb|, as the DAC,
// time converters, arbiter and difference counter would deliver them.
//
// The whole input ramp 0..1023 is converted (the document's own test). For each
// code the result on pb at eoc must equal the code, and the number of cycles from
// the Idle cycle that sees start to the EOC cycle must equal a count worked out
// from the bits of the code: 3 cycles (Idle, ModeSelect, EOC) plus one per step,
// where a step at index q resolves the run of bits equal to bit q (capped at q)
// if that run is 3 or longer, else one bit. The two conversions the document
// shows are checked by number: 412 takes 13 cycles when the front end reports
// the smallest difference every cycle (so no run is predicted, as in the
// document's trace of that code) and 11 with ideal differences; 511 takes 6.
// 341 (alternating bits) takes 13.
// It also aborts a conversion with the reset, lets start stay low for a few idle
// cycles, and counts each mechanism (single-bit step, predictive step, the
// ModeSelect->Predic, Normal->Predic, Predic->Predic and Predic->Normal
// transitions, idle wait, reset abort, and predictive steps of each length 3..9
// bits); a mechanism that never happens is a failure, as is a predictive step of
// any other length.
// The top runs at its default parameters.
module tb_psar_top;
  import psar_pkg::*;
  logic       clk = 0, rst_n, start, din, rst_dac, eoc, enb_pb;
  logic [9:0] cnt, pb;
  logic [3:0] index_cnt;
  int         vin;
  logic       no_pred;   // front end reports no usable difference
  int checks = 0, failures = 0;
  int n_single = 0, n_pred = 0, n_m2p = 0, n_n2p = 0, n_p2p = 0, n_p2n = 0;
  int n_idle_wait = 0, n_abort = 0;
  int n_run [0:15];          // predictive steps by the number of bits resolved
  longint total_cycles = 0;

  psar_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .din(din), .cnt(cnt), .pb(pb),
    .rst_dac(rst_dac), .eoc(eoc), .index_cnt(index_cnt), .enb_pb(enb_pb));

  always #5 clk = ~clk;

  // ideal front end
  always_comb begin
    din = (vin >= int'(pb));
    if (no_pred) cnt = din ? 10'd0 : 10'd1;   // smallest difference: one bit per step
    else         cnt = 10'(din ? vin - int'(pb) : int'(pb) - vin);
  end

  // mechanism counters, from the controller's state and strobes
  psar_state_t prev_state;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_fsm.state == ST_IDLE && !start) n_idle_wait++;
      if (enb_pb && !dut.load_filler) n_single++;
      if (enb_pb &&  dut.load_filler) begin
        n_pred++;
        n_run[int'(index_cnt) - int'(dut.a_b)]++;
      end
      if (prev_state == ST_MODE_SELECT && dut.u_fsm.state == ST_PREDIC) n_m2p++;
      if (prev_state == ST_NORMAL && dut.u_fsm.state == ST_PREDIC) n_n2p++;
      if (prev_state == ST_PREDIC && dut.u_fsm.state == ST_PREDIC) n_p2p++;
      if (prev_state == ST_PREDIC && dut.u_fsm.state == ST_NORMAL) n_p2n++;
    end
    prev_state <= dut.u_fsm.state;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected cycle count, from the bits of the code
  function automatic int expected_cycles(int code);
    int q = 9, steps = 0, run, d;
    logic [9:0] v = 10'(code);
    while (q >= 0) begin
      run = 1;
      for (int b = q - 1; b >= 0 && v[b] == v[q]; b--) run++;
      if (q > 0 && run > q) run = q;
      d = (q > 0 && run >= 3) ? run : 1;
      q -= d;
      steps++;
    end
    return steps + 3;
  endfunction

  task automatic convert(input int code, input logic np, output int cycles);
    @(negedge clk);
    vin     = code;
    no_pred = np;
    start   = 1'b1;
    cycles = 1;
    do begin
      @(posedge clk);
      #1;
      cycles++;
    end while (!eoc && cycles < 40);
    checks++;
    if (pb !== 10'(code)) begin
      failures++;
      $display("FAIL code=%0d result=%0d", code, pb);
    end
    checks++;
    if (cycles != (np ? 13 : expected_cycles(code))) begin
      failures++;
      $display("FAIL code=%0d cycles=%0d expected=%0d", code, cycles, expected_cycles(code));
    end
    total_cycles += cycles;
    @(negedge clk);
    start = 1'b0;
  endtask

  initial begin
    int cyc;
    foreach (n_run[i]) n_run[i] = 0;
    start = 0; vin = 0; no_pred = 0; rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);          // start low: idle wait

    // the two conversions shown in the source document
    convert(412, 1'b1, cyc);
    checks++;
    if (cyc != 13) begin failures++; $display("FAIL 412 took %0d cycles", cyc); end
    convert(412, 1'b0, cyc);            // run 111 at bits 4..2 is predicted
    checks++;
    if (cyc != 11) begin failures++; $display("FAIL 412 predicted took %0d cycles", cyc); end
    convert(341, 1'b0, cyc);            // 0101010101: no run to predict
    checks++;
    if (cyc != 13) begin failures++; $display("FAIL 341 took %0d cycles", cyc); end
    convert(511, 1'b0, cyc);
    checks++;
    if (cyc != 6) begin failures++; $display("FAIL 511 took %0d cycles", cyc); end

    // abort a conversion half way with the reset
    @(negedge clk);
    vin = 300; start = 1'b1;
    repeat (6) @(negedge clk);
    rst_n = 1'b0;
    #1;
    checks++;
    if (dut.u_fsm.state != ST_IDLE || pb != '0 || rst_dac != 1'b0) begin
      failures++;
      $display("FAIL reset did not abort the conversion");
    end else n_abort++;
    start = 1'b0;
    @(negedge clk) rst_n = 1'b1;

    // ascending ramp over all 1024 codes
    total_cycles = 0;
    for (int code = 0; code < 1024; code++) begin
      convert(code, 1'b0, cyc);
      if (code % 97 == 0) repeat (2) @(negedge clk);   // occasional idle gap
    end
    $display("ramp: %0d cycles for 1024 conversions, %0d with single-bit steps only (%0.1f%% fewer)",
             total_cycles, 13 * 1024, 100.0 * (1.0 - real'(total_cycles) / real'(13 * 1024)));
    $display("mechanisms: single=%0d predictive=%0d M->P=%0d N->P=%0d P->P=%0d P->N=%0d idle_wait=%0d abort=%0d",
             n_single, n_pred, n_m2p, n_n2p, n_p2p, n_p2n, n_idle_wait, n_abort);
    checks++; if (n_single    == 0) begin failures++; $display("FAIL no single-bit step"); end
    checks++; if (n_pred      == 0) begin failures++; $display("FAIL no predictive step"); end
    checks++; if (n_m2p       == 0) begin failures++; $display("FAIL no ModeSelect->Predic"); end
    checks++; if (n_n2p       == 0) begin failures++; $display("FAIL no Normal->Predic"); end
    checks++; if (n_p2p       == 0) begin failures++; $display("FAIL no Predic->Predic"); end
    checks++; if (n_p2n       == 0) begin failures++; $display("FAIL no Predic->Normal"); end
    // every run length from 3 to 9 bits is predicted at least once, and no other
    for (int i = 0; i < 16; i++) begin
      $display("predictive steps resolving %0d bits: %0d", i, n_run[i]);
      checks++;
      if ((i >= 3 && i <= 9) ? n_run[i] == 0 : n_run[i] != 0) begin
        failures++;
        $display("FAIL predictive steps of %0d bits: %0d", i, n_run[i]);
      end
    end
    checks++; if (n_idle_wait == 0) begin failures++; $display("FAIL no idle wait"); end
    checks++; if (n_abort     == 0) begin failures++; $display("FAIL no reset abort"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
