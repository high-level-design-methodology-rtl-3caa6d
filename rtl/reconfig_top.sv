// reconfig_top: the reconfigurable-system designs side by side.
//
// Four independent designs share this top, each with its own ports:
//   - SOLAR routing channel: a 4 x 7 array of nodes connected through a
//     time-multiplexed shift-register channel (solar_array)
//   - DRAW scaling shifter: the DRAP's 16-bit 3-stage barrel shifter
//   - DRAW Turbo-decoder datapaths built from DRPU cells: one Max-Log-MAP
//     state-metric unit (alpha_unit) and one 8-state LLR unit (llr_unit)
//   - the C/C++ comment-filter state machine and the 8-bit example MUX
// All clocked parts use clk and the synchronous active-high rst, except the
// comment filter, whose active-low reset is driven from rst.
module reconfig_top
  import solar_pkg::*;
  import draw_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // SOLAR routing channel
  input  node_cfg_t [6:0][3:0] sol_cfg,
  input  data_t [3:0] sol_in_data,
  input  logic        sol_in_valid,
  output logic        sol_in_ready,
  output data_t       sol_out_data,
  output slot_t       sol_out_slot,
  output logic        sol_out_valid,
  output logic [6:0][3:0] sol_node_rd,
  output logic [6:0][3:0] sol_node_wr,
  // DRAP barrel shifter
  input  logic [15:0] bs_din,
  input  logic [2:0]  bs_num_shift,
  input  logic        bs_dir,
  input  logic        bs_arith_logic,
  output logic [15:0] bs_dout,
  output logic [15:0] bs_stage1,
  // Turbo decoder: state-metric unit
  input  logic [6:0]  am_sub_cfg,
  input  metric_t     am_s1,
  input  metric_t     am_s2,
  input  metric_t     am_s1p,
  input  metric_t     am_s2p,
  input  metric_t     am_lambda,
  input  metric_t     am_alpha_i,
  input  metric_t     am_alpha_j,
  output metric_t     am_alpha_m,
  // Turbo decoder: LLR unit, 8 states
  input  metric_t     llr_alpha [2][8],
  input  metric_t     llr_beta  [2][8],
  input  metric_t     llr_gamma [2][8],
  output metric_t     llr_out,
  // comment filter
  input  logic        cf_ch_valid,
  input  logic [7:0]  cf_ch,
  output logic        cf_in_comment,
  // example MUX
  input  logic [7:0]  mux_d1,
  input  logic [7:0]  mux_d2,
  input  logic        mux_select,
  output logic [7:0]  mux_dout
);

  solar_array u_solar (
    .clk(clk), .rst(rst), .cfg(sol_cfg),
    .in_data(sol_in_data), .in_valid(sol_in_valid), .in_ready(sol_in_ready),
    .out_data(sol_out_data), .out_slot(sol_out_slot), .out_valid(sol_out_valid),
    .node_rd(sol_node_rd), .node_wr(sol_node_wr)
  );

  barrel_shifter u_bs (
    .din(bs_din), .num_shift(bs_num_shift), .dir(bs_dir), .arith_logic(bs_arith_logic),
    .dout(bs_dout), .stage1_o(bs_stage1)
  );

  alpha_unit u_alpha (
    .clk(clk), .rst(rst), .sub_cfg(am_sub_cfg),
    .s1(am_s1), .s2(am_s2), .s1p(am_s1p), .s2p(am_s2p), .lambda(am_lambda),
    .alpha_i(am_alpha_i), .alpha_j(am_alpha_j), .alpha_m(am_alpha_m)
  );

  llr_unit u_llr (
    .clk(clk), .rst(rst), .alpha(llr_alpha), .beta(llr_beta), .gamma(llr_gamma), .llr(llr_out)
  );

  comment_filter u_cf (
    .clk(clk), .rst_n(!rst), .ch_valid(cf_ch_valid), .ch(cf_ch), .in_comment(cf_in_comment)
  );

  uadl_mux u_mux (.d1(mux_d1), .d2(mux_d2), .select(mux_select), .dout(mux_dout));

endmodule
