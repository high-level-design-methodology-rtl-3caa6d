// llr_unit: Max-Log-MAP log-likelihood ratio of one information bit.
//
//   LLR_k = max over s1 (alpha + gamma + beta) - max over s0 (alpha + gamma + beta)
// For each of the NS transitions of the bit-1 set (index 1) and of the bit-0
// set (index 0) one DRPU adds alpha_k and beta_k+1, a second adds gamma_k, a
// binary tree of max DRPUs reduces the set, and a final DRPU subtracts the
// bit-0 maximum from the bit-1 maximum. All inputs are presented in one
// cycle; the LLR appears LATENCY = 3 + log2(NS) cycles later: 6 cycles for
// the 8-state 3GPP code (the document's number), 5 for 4 states. One LLR can
// start every cycle. Both sets are reduced in parallel, which is how the
// document's 4-state datapath is drawn (its bit-1 maximum arrives beside the
// bit-0 tree); this uses 2*(3*NS-1)+1 DRPU cells, where the document counts
// 3*NS-1 for the LLR part. NS must be a power of two.
module llr_unit
  import draw_pkg::*;
#(
  parameter int unsigned NS = 8
) (
  input  logic    clk,
  input  logic    rst,
  input  metric_t alpha [2][NS],
  input  metric_t beta  [2][NS],
  input  metric_t gamma [2][NS],
  output metric_t llr
);

  localparam int unsigned LATENCY = 3 + $clog2(NS);

  initial assert (NS >= 2 && (NS & (NS - 1)) == 0) else $error("llr_unit: NS must be a power of two");

  metric_t tmax [2];
  metric_t gamma_d [2][NS];

  for (genvar s = 0; s < 2; s++) begin : g_set
    metric_t ab  [NS];
    // heap-ordered max tree: node n has children 2n+1, 2n+2; leaves NS-1..2NS-2
    metric_t tr  [2*NS-1];

    for (genvar i = 0; i < NS; i++) begin : g_leaf
      drpu_cell u_ab  (.clk, .rst, .cfg(DRPU_ADD), .a(alpha[s][i]), .b(beta[s][i]),  .y(ab[i]));
      drpu_cell u_abg (.clk, .rst, .cfg(DRPU_ADD), .a(ab[i]),       .b(gamma_d[s][i]), .y(tr[NS-1+i]));
    end

    for (genvar n = 0; n < NS - 1; n++) begin : g_max
      drpu_cell u_max (.clk, .rst, .cfg(DRPU_MAX), .a(tr[2*n+1]), .b(tr[2*n+2]), .y(tr[n]));
    end

    assign tmax[s] = tr[0];
  end

  // gamma meets alpha+beta one cycle later
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < 2; s++)
        for (int i = 0; i < NS; i++) gamma_d[s][i] <= '0;
    end else begin
      gamma_d <= gamma;
    end
  end

  drpu_cell u_sub (.clk, .rst, .cfg(DRPU_SUB), .a(tmax[1]), .b(tmax[0]), .y(llr));

endmodule
