// alpha_unit: Max-Log-MAP state-metric update for one trellis state m.
//
//   gamma_i = ((s1 +/- s2) +/- lambda) +/- max(0, lambda)
//   gamma_j = (s1p +/- s2p) +/- max(0, lambda)
//   alpha_m = max(alpha_i +/- gamma_i, alpha_j +/- gamma_j)
// s1/s2 and s1p/s2p are the soft inputs of time k-1 for the two branches
// entering state m, lambda the a-priori value of time k-1, alpha_i/alpha_j
// the metrics of the two predecessor states. Each +/- is a DRPU cell whose
// sign comes from sub_cfg (bit set = subtract): bit 0 s1/s2, 1 lambda,
// 2 max term (branch i), 3 alpha_i, 4 s1p/s2p, 5 max term (branch j),
// 6 alpha_j. The signs depend on the trellis branch and the document does not
// print them, so they are configuration, as a DRPU's function is. The same
// unit computes beta in the backward recursion.
// Nine DRPU cells (seven +/-, two max), as in the document; this design adds
// pipeline registers so that all inputs are presented in the same cycle and
// the result appears LATENCY = 5 cycles later (the document's 5 cycles). The
// sign configuration travels down the pipeline with its data, so a new state
// update, with its own signs, can start every cycle.
module alpha_unit
  import draw_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [6:0] sub_cfg,
  input  metric_t    s1,
  input  metric_t    s2,
  input  metric_t    s1p,
  input  metric_t    s2p,
  input  metric_t    lambda,
  input  metric_t    alpha_i,
  input  metric_t    alpha_j,
  output metric_t    alpha_m
);

  localparam int unsigned LATENCY = 5;

  function automatic drpu_op_e pm(logic sub);
    return sub ? DRPU_SUB : DRPU_ADD;
  endfunction

  metric_t c0, m0, c4, c1, c5, gi, c3, c6;
  logic [6:0] cfg_d1, cfg_d2, cfg_d3;  // sign configuration, following its data
  metric_t lam_d1, m0_d1, gj_d1;
  metric_t ai_d [3];
  metric_t aj_d [3];

  // level 1
  drpu_cell u_c0 (.clk, .rst, .cfg(pm(sub_cfg[0])), .a(s1),  .b(s2),     .y(c0));
  drpu_cell u_m0 (.clk, .rst, .cfg(DRPU_MAX),       .a('0),  .b(lambda), .y(m0));
  drpu_cell u_c4 (.clk, .rst, .cfg(pm(sub_cfg[4])), .a(s1p), .b(s2p),    .y(c4));
  // level 2
  drpu_cell u_c1 (.clk, .rst, .cfg(pm(cfg_d1[1])), .a(c0),  .b(lam_d1), .y(c1));
  drpu_cell u_c5 (.clk, .rst, .cfg(pm(cfg_d1[5])), .a(c4),  .b(m0),     .y(c5));
  // level 3: gamma_i
  drpu_cell u_c2 (.clk, .rst, .cfg(pm(cfg_d2[2])), .a(c1),  .b(m0_d1),  .y(gi));
  // level 4
  drpu_cell u_c3 (.clk, .rst, .cfg(pm(cfg_d3[3])), .a(ai_d[2]), .b(gi),    .y(c3));
  drpu_cell u_c6 (.clk, .rst, .cfg(pm(cfg_d3[6])), .a(aj_d[2]), .b(gj_d1), .y(c6));
  // level 5
  drpu_cell u_mx (.clk, .rst, .cfg(DRPU_MAX),       .a(c3),  .b(c6),     .y(alpha_m));

  // balancing registers
  always_ff @(posedge clk) begin
    if (rst) begin
      lam_d1 <= '0;
      m0_d1  <= '0;
      cfg_d1 <= '0;
      cfg_d2 <= '0;
      cfg_d3 <= '0;
      gj_d1  <= '0;
      for (int i = 0; i < 3; i++) begin
        ai_d[i] <= '0;
        aj_d[i] <= '0;
      end
    end else begin
      lam_d1 <= lambda;
      m0_d1  <= m0;
      cfg_d1 <= sub_cfg;
      cfg_d2 <= cfg_d1;
      cfg_d3 <= cfg_d2;
      gj_d1  <= c5;
      ai_d[0] <= alpha_i;
      aj_d[0] <= alpha_j;
      for (int i = 1; i < 3; i++) begin
        ai_d[i] <= ai_d[i-1];
        aj_d[i] <= aj_d[i-1];
      end
    end
  end

endmodule
