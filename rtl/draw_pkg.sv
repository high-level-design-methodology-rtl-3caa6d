// draw_pkg: types shared by the DRAW datapaths of the Turbo decoder.
//
// A DRPU configured for the Max-Log-MAP datapaths performs one of a small set
// of two-operand operations on 8-bit signed metrics and registers the result.
// The document names add, subtract and max configurations (cfgAdd, cfgSub,
// cfgMax, 3 bits each); the code values below and the extra MIN code (the
// DRAP has a MIN/MAX unit) are this design's choices.
package draw_pkg;

  localparam int unsigned METRIC_W = 8;

  typedef logic signed [METRIC_W-1:0] metric_t;

  typedef enum logic [2:0] {
    DRPU_ADD = 3'd0,
    DRPU_SUB = 3'd1,
    DRPU_MAX = 3'd2,
    DRPU_MIN = 3'd3
  } drpu_op_e;

endpackage
