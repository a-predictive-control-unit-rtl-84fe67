// psar_pkg: constants and types shared by the predictive SAR (PSAR) control unit.
//
// The converter resolves N_BITS = 10 bits, MSB first. The bit index of the
// successive-approximation register runs from 9 (MSB) down to 0 and is held in a
// 4-bit counter, so every index-carrying bus is IDX_W = 4 bits wide. A step that
// resolves PRED_MIN = 3 or more bits at once is a predictive step; shorter runs
// are resolved one bit per cycle. These three numbers follow the source design.
// The state encoding is this design's own choice.
package psar_pkg;

  localparam int unsigned N_BITS   = 10;   // converter resolution
  localparam int unsigned IDX_W    = 4;    // width of index and Dif_CNT buses
  localparam int unsigned CNT_W    = 10;   // width of the measured-difference bus
  localparam int unsigned PRED_MIN = 3;    // fixed B operand of the comparator

  typedef logic [IDX_W-1:0]  idx_t;
  typedef logic [N_BITS-1:0] word_t;

  // Controller states; one clock cycle is spent in each visit.
  typedef enum logic [2:0] {
    ST_IDLE        = 3'd0,  // wait for start, reset the DAC, set the MSB trial bit
    ST_MODE_SELECT = 3'd1,  // first comparison settles, pick normal or predictive
    ST_NORMAL      = 3'd2,  // last step resolved a single bit
    ST_PREDIC      = 3'd3,  // last step resolved a run of bits
    ST_EOC         = 3'd4   // result valid on PB for one cycle
  } psar_state_t;

endpackage
