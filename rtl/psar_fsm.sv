// psar_fsm: Mealy controller of the predictive SAR control unit.
//
// One clock cycle per state visit:
//   ST_IDLE         rst_dac low (DAC reset), set_msb high; leave on start = 1.
//   ST_MODE_SELECT  nothing is written while the first comparison (MSB) settles;
//                   go to ST_PREDIC if jump, else ST_NORMAL.
//   ST_NORMAL,      one conversion step per cycle: enb_pb and enable_index high,
//   ST_PREDIC       load_n_index and load_filler follow jump (Mealy outputs).
//                   Next: ST_EOC if zeroflagin, else ST_PREDIC if jump, else
//                   ST_NORMAL. The two states drive the same outputs; the state
//                   records whether the last step was a predictive one.
//   ST_EOC          eoc high for one cycle, then back to ST_IDLE.
// A conversion without predictive steps therefore takes 13 cycles: Idle,
// ModeSelect, ten steps and EOC. rst_n (active low, asynchronous) returns the
// machine to ST_IDLE and aborts a conversion.
// States, transitions and output values are those of the source design's state
// diagram, including correct_index, which the diagram holds low in every state;
// it is kept as a port and not used by the rest of this design. The state
// encoding and the asynchronous reset are this design's own choices.
module psar_fsm
  import psar_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic jump,
  input  logic zeroflagin,
  output logic correct_index,
  output logic enable_index,
  output logic load_n_index,
  output logic enb_pb,
  output logic load_filler,
  output logic set_msb,
  output logic rst_dac,       // active low
  output logic eoc,
  output psar_state_t state
);

  psar_state_t next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_IDLE;
    else        state <= next;
  end

  always_comb begin
    next          = state;
    correct_index = 1'b0;
    enable_index  = 1'b0;
    load_n_index  = 1'b0;
    enb_pb        = 1'b0;
    load_filler   = 1'b0;
    set_msb       = 1'b0;
    rst_dac       = 1'b1;
    eoc           = 1'b0;
    unique case (state)
      ST_IDLE: begin
        rst_dac = 1'b0;
        set_msb = 1'b1;
        if (start) next = ST_MODE_SELECT;
      end
      ST_MODE_SELECT: begin
        next = jump ? ST_PREDIC : ST_NORMAL;
      end
      ST_NORMAL, ST_PREDIC: begin
        enb_pb       = 1'b1;
        enable_index = 1'b1;
        load_n_index = jump;
        load_filler  = jump;
        if (zeroflagin) next = ST_EOC;
        else if (jump)  next = ST_PREDIC;
        else            next = ST_NORMAL;
      end
      ST_EOC: begin
        eoc  = 1'b1;
        next = ST_IDLE;
      end
      default: next = ST_IDLE;
    endcase
  end

endmodule
