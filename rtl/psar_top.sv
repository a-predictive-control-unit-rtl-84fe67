// psar_top: predictive SAR (PSAR) control unit for a 10-bit time-domain SAR ADC.
//
// A conventional SAR control unit resolves one bit per clock. Here the analog
// front end also measures how far the input Vin is from the DAC voltage Vref
// (cnt, in LSB), which tells how many of the following bits are equal to the
// current comparison result din. When that run, including the current bit, is
// three bits or longer, the whole run is written into the register in one cycle
// and the bit index jumps past it. Conversions of inputs with long runs of equal
// bits finish in fewer cycles; a conversion with no such run takes 13 cycles.
//
// Datapath (one conversion step per cycle in ST_NORMAL/ST_PREDIC):
//   u_combi   dif_cnt = bits resolvable now, from index q, cnt and din
//   u_cmp     agtb    = dif_cnt >= 3
//   u_sub     a_b     = q - dif_cnt, neg_flag on a borrow
//   jump      = agtb and not neg_flag: take a predictive step
//   u_filler  next register word for a predictive step
//   u_pbr     register: single-bit step, or load of the filler word on jump
//   u_cnt     index q: count down by one, or load a_b on jump; preset to 9
//   u_fsm     Idle -> ModeSelect -> steps -> EOC
//
// Interface: start begins a conversion from Idle. The front end must present
// din and cnt for the current pb during each step cycle (combinationally, within
// the cycle). eoc is high for one cycle while pb holds the result; rst_dac is low
// while idle, to reset the DAC. rst_n is active low. index_cnt and enb_pb are
// brought out for observation, as in the source design's RTL view.
//
// The blocks, their connection and the comparator constant 3 follow the source
// design. Two choices are this design's own: jump is formed as "agtb and not
// neg_flag" (the source describes the jump signal as an OR with the zero flag,
// which would force a predictive load at index 0), and the counter preset is
// driven by set_msb or eoc, so the index is 9 before each conversion and returns
// to 9 at its end.
module psar_top
  import psar_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              din,
  input  logic [CNT_W-1:0]  cnt,
  output logic [N_BITS-1:0] pb,
  output logic              rst_dac,
  output logic              eoc,
  output logic [IDX_W-1:0]  index_cnt,
  output logic              enb_pb
);

  idx_t        q, dif_cnt, a_b;
  word_t       filler_out;
  logic        agtb, neg_flag, jump, zero_flag;
  logic        correct_index, enable_index, load_n_index, load_filler, set_msb;
  psar_state_t state;

  psar_combi_cntr #(.N(N_BITS), .W(IDX_W)) u_combi (
    .index_cnt (q),
    .cnt       (cnt),
    .din       (din),
    .dif_cnt   (dif_cnt)
  );

  psar_comparator #(.W(IDX_W)) u_cmp (
    .a    (dif_cnt),
    .b    (IDX_W'(PRED_MIN)),
    .agtb (agtb)
  );

  psar_subtract #(.W(IDX_W)) u_sub (
    .a        (q),
    .b        (dif_cnt),
    .a_b      (a_b),
    .neg_flag (neg_flag)
  );

  always_comb jump = agtb & ~neg_flag;

  psar_index_counter #(.W(IDX_W), .PRESET(N_BITS - 1)) u_cnt (
    .clk       (clk),
    .prst      (set_msb | eoc),
    .load      (load_n_index),
    .enable    (enable_index),
    .data_in   (a_b),
    .q         (q),
    .zero_flag (zero_flag)
  );

  psar_filler #(.N(N_BITS), .W(IDX_W)) u_filler (
    .di         (din),
    .index_cnt  (q),
    .i_min      (a_b),
    .pb         (pb),
    .filler_out (filler_out)
  );

  psar_pbr #(.N(N_BITS), .W(IDX_W)) u_pbr (
    .clk         (clk),
    .rst_n       (rst_n),
    .index_cnt   (q),
    .filler      (filler_out),
    .din         (din),
    .set_msb     (set_msb),
    .enb_pb      (enb_pb),
    .load_filler (load_filler),
    .pb          (pb)
  );

  psar_fsm u_fsm (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (start),
    .jump          (jump),
    .zeroflagin    (zero_flag),
    .correct_index (correct_index),
    .enable_index  (enable_index),
    .load_n_index  (load_n_index),
    .enb_pb        (enb_pb),
    .load_filler   (load_filler),
    .set_msb       (set_msb),
    .rst_dac       (rst_dac),
    .eoc           (eoc),
    .state         (state)
  );

  always_comb index_cnt = q;

  // A predictive step must never move the index upward or below zero.
  a_jump_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (enb_pb && load_filler) |-> (!neg_flag && a_b < q));

endmodule
