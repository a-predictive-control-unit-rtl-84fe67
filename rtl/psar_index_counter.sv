// psar_index_counter: the "counter with preload" that holds the bit index Q.
//
// Q is the position in the 10-bit result that currently carries the trial bit.
// A conversion starts with Q = 9 (the MSB) and ends when Q reaches 0. Per rising
// clock edge, in priority order:
//   prst          Q <= PRESET (9): start of a conversion / end of the last one
//   load          Q <= data_in: the index computed for a predictive step
//   enable        Q <= Q - 1: a single-bit step; Q holds at 0 instead of wrapping
// zero_flag is high, combinationally, while Q is 0.
// The ports, the preset value 9, counting down and the 9..0 range follow the
// source design. The priority order and the hold at zero are this design's own
// choices. As in the source there is no reset pin: the controller drives prst
// every cycle it is idle, so Q is 9 before every conversion.
module psar_index_counter #(
  parameter int unsigned W      = 4,
  parameter int unsigned PRESET = 9
) (
  input  logic         clk,
  input  logic         prst,
  input  logic         load,
  input  logic         enable,
  input  logic [W-1:0] data_in,
  output logic [W-1:0] q,
  output logic         zero_flag
);

  always_ff @(posedge clk) begin
    if (prst)                    q <= W'(PRESET);
    else if (load)               q <= data_in;
    else if (enable && q != '0)  q <= q - 1'b1;
  end

  always_comb zero_flag = (q == '0);

endmodule
