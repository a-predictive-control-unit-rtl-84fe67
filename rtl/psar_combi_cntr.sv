// psar_combi_cntr: combinational counter decoder, the prediction rule.
//
// At bit index Q the register holds the resolved bits above Q and a trial '1' at
// Q, so the DAC voltage is Vref = prefix + 2**Q (in LSB). The front end reports
// cnt = |Vin - Vref| in LSB and din = (Vin >= Vref). From these the bits of Vin
// below Q are known exactly:
//   din = 1:  Vin - Vref = cnt          -> bits Q-1..0 of Vin are cnt
//   din = 0:  Vin - prefix = 2**Q - cnt -> bits Q-1..0 of Vin are ~(cnt - 1)
// so the number k of bits just below Q that equal din is the number of leading
// ones, from bit Q-1 down, of cnt (din = 1) or of cnt - 1 (din = 0). This cycle can
// therefore resolve dif_cnt = k + 1 bits (bit Q plus the run). dif_cnt is capped
// at Q, so a step never goes below index 0 and bit 0 is always resolved by a
// real comparison in a single-bit step; at Q = 0, dif_cnt is 1.
// The source design names this block, its inputs Index_CNT and CNT (10 bits) and
// its output Dif_CNT (4 bits), but gives no rule. The rule above, the meaning of
// cnt and the extra din input are this design's own. Purely combinational.
module psar_combi_cntr #(
  parameter int unsigned N = 10,
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] index_cnt,
  input  logic [N-1:0] cnt,
  input  logic         din,
  output logic [W-1:0] dif_cnt
);

  logic [N-1:0] r;
  logic         run;
  logic [W-1:0] k;

  always_comb begin
    r   = din ? cnt : cnt - 1'b1;
    run = 1'b1;
    k   = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (i < int'(index_cnt)) begin
        if (run && r[i]) k = k + 1'b1;
        else             run = 1'b0;
      end
    end
    if (index_cnt == '0)        dif_cnt = W'(1);
    else if (k + 1'b1 > index_cnt) dif_cnt = index_cnt;
    else                        dif_cnt = k + 1'b1;
  end

endmodule
