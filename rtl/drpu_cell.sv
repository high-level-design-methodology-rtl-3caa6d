// drpu_cell: a DRPU configured for the Max-Log-MAP datapaths.
//
// Computes add, subtract, max or min of two 8-bit signed metrics and
// registers the result, so each cell adds one clock cycle, as in the
// document's cycle counts (5 cycles for alpha, 6 for an 8-state LLR). Add and
// subtract saturate at the 8-bit limits; saturation and the synchronous reset
// are this design's choices (the document does not say how a DRPU handles
// overflow).
module drpu_cell
  import draw_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  drpu_op_e cfg,
  input  metric_t  a,
  input  metric_t  b,
  output metric_t  y
);

  function automatic metric_t sat(logic signed [METRIC_W:0] v);
    if (v > $signed({2'b00, {(METRIC_W-1){1'b1}}}))       return {1'b0, {(METRIC_W-1){1'b1}}};
    else if (v < $signed({2'b11, {(METRIC_W-1){1'b0}}}))  return {1'b1, {(METRIC_W-1){1'b0}}};
    else                                                  return v[METRIC_W-1:0];
  endfunction

  metric_t r;

  always_comb begin
    unique case (cfg)
      DRPU_ADD: r = sat({a[METRIC_W-1], a} + {b[METRIC_W-1], b});
      DRPU_SUB: r = sat({a[METRIC_W-1], a} - {b[METRIC_W-1], b});
      DRPU_MAX: r = (a > b) ? a : b;
      DRPU_MIN: r = (a < b) ? a : b;
      default:  r = a;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) y <= '0;
    else     y <= r;
  end

endmodule
