// solar_array: the SOLAR reconfigurable routing channel, COLS columns of K
// nodes (4 x 7 by default, the array used for the 4-feature Iris data).
//
// Instead of multiplexed point-to-point wiring, nodes communicate through a
// time-multiplexed stream. A batch of N bytes is serialized with each byte
// repeated C times (L = C*N slots) and shifted into column 1. Every node
// knows the slot passing its tap from the common phase counter, reads the
// slots it is configured for, computes, and writes its result back into
// those same slots while the batch circulates in the column. After 3L cycles
// the column passes the batch on to the next column and takes the next
// batch, so COLS batches are in flight and one batch leaves every 3L cycles.
// Which node reads which earlier result is set only by the node slot
// configuration, so connectivity changes cost no wiring.
//
// Interface: offer a batch on in_data with in_valid; it is taken when
// in_ready is high (last cycle of each period). Results leave as a stream on
// out_data, slot out_slot in phase out_slot, with out_valid high, COLS
// periods after the batch was taken. cfg[col][node] configures each node.
// Timing: latency from the cycle after acceptance to the first output slot
// is COLS*3L cycles; throughput one batch per 3L cycles.
module solar_array
  import solar_pkg::*;
#(
  parameter int unsigned K    = 4,
  parameter int unsigned COLS = 7,
  parameter int unsigned C    = 5,
  parameter int unsigned N    = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  node_cfg_t [COLS-1:0][K-1:0] cfg,
  input  data_t [N-1:0] in_data,
  input  logic        in_valid,
  output logic        in_ready,
  output data_t       out_data,
  output slot_t       out_slot,
  output logic        out_valid,
  output logic [COLS-1:0][K-1:0] node_rd,  // per-node read strobes
  output logic [COLS-1:0][K-1:0] node_wr   // per-node write strobes
);

  localparam int unsigned L = C * N;

  phase_t phase;
  logic   fill, period_end;
  data_t  stream;
  logic   batch_valid;
  data_t [COLS:0] link;
  logic [COLS-1:0] vpipe_q;

  routing_timer #(.L(L)) u_timer (
    .clk(clk), .rst(rst), .phase_o(phase), .fill_o(fill), .period_end_o(period_end)
  );

  input_serializer #(.N(N), .C(C)) u_ser (
    .clk(clk), .rst(rst), .phase(phase), .period_end(period_end),
    .in_data(in_data), .in_valid(in_valid), .in_ready(in_ready),
    .stream_o(stream), .batch_valid_o(batch_valid)
  );

  assign link[0] = stream;

  for (genvar c = 0; c < COLS; c++) begin : g_col
    solar_column #(.K(K), .C(C), .N(N)) u_col (
      .clk(clk), .rst(rst), .phase(phase), .fill(fill), .cfg(cfg[c]),
      .din(link[c]), .dout(link[c+1]), .rd_o(node_rd[c]), .wr_o(node_wr[c])
    );
  end

  // vpipe_q[j-1]: the batch that column j passes on in the next fill
  // phase is real; shifted once per period
  always_ff @(posedge clk) begin
    if (rst)             vpipe_q <= '0;
    else if (period_end) vpipe_q <= (vpipe_q << 1) | COLS'(batch_valid);
  end

  assign out_data  = link[COLS];
  assign out_slot  = slot_t'(phase);
  assign out_valid = fill && vpipe_q[COLS-1];

endmodule
