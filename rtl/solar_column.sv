// solar_column: one column of the SOLAR routing channel.
//
// An L = C*N stage shift register (8 bits per stage) with K nodes attached.
// Node i reads register C*(i+1)-1 and drives the input of register C*(i+1);
// the last node drives the column output. While fill is high the first
// register takes din (the stream from the previous column or the input
// serializer); otherwise the switch at the top of the column feeds the
// column's own output back, and the batch circulates. A batch that entered
// in phases 0..L-1 leaves, in the same slot order, during phases 0..L-1 of
// the next period. This follows the document's one-column structure (20
// registers, 4 nodes at every 5th register); the node spacing C for general
// K and the direct wire from the last node to the next column are this
// design's reading of it.
module solar_column
  import solar_pkg::*;
#(
  parameter int unsigned K = 4,  // nodes per column
  parameter int unsigned C = 5,  // copy ratio
  parameter int unsigned N = 4   // input data per batch
) (
  input  logic      clk,
  input  logic      rst,
  input  phase_t    phase,
  input  logic      fill,
  input  node_cfg_t [K-1:0] cfg,
  input  data_t     din,
  output data_t     dout,
  output logic [K-1:0] rd_o,
  output logic [K-1:0] wr_o
);

  localparam int unsigned L = C * N;

  initial assert (C * K <= L) else $error("solar_column: nodes do not fit in column");

  data_t [L-1:0] sr_q;
  data_t [K-1:0] node_out;

  for (genvar i = 0; i < K; i++) begin : g_node
    solar_node #(.L(L), .POS(C * (i + 1))) u_node (
      .clk   (clk),
      .rst   (rst),
      .cfg   (cfg[i]),
      .phase (phase),
      .tap_i (sr_q[C*(i+1)-1]),
      .out_o (node_out[i]),
      .rd_o  (rd_o[i]),
      .wr_o  (wr_o[i])
    );
  end

  // next value of every register: plain shift, node outputs at the taps
  data_t [L-1:0] sr_d;
  always_comb begin
    sr_d[0] = fill ? din : node_out[K-1];
    for (int j = 1; j < L; j++) sr_d[j] = sr_q[j-1];
    for (int i = 0; i < K - 1; i++) sr_d[C*(i+1)] = node_out[i];
  end

  always_ff @(posedge clk) begin
    if (rst) sr_q <= '0;
    else     sr_q <= sr_d;
  end

  assign dout = node_out[K-1];

endmodule
