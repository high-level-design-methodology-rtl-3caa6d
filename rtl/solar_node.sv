// solar_node: one processing node attached to a routing-channel column.
//
// The node sits between two registers of the column's shift register
// ("register 1" feeds tap_i, the output goes to "register 2"). Its output
// multiplexer passes tap_i on, except when the node replaces a slot with its
// own result. From the period phase it derives which stream slot is in
// register 1, slot = (phase - POS) mod L, and which mode it is in:
//   read window   phase in [POS, POS+L):    store the value of slot_a (and of
//                                           slot_b for a binary operation)
//   processing    once the read window is over the operand registers are
//                 complete and the ALU result is valid
//   write window  phase in [POS+L, POS+2L): replace slot_a (and slot_b) with
//                                           the result
//   idle          otherwise
// POS is the node's read/write position in the column (a multiple of C).
// The schedule and the read-then-write-back to the same slots follow the
// document. There the node is a small soft processor clocked faster than the
// shift register; here it is fixed-function logic on the shift-register
// clock, computing its result in one cycle, which meets the document's bound
// on computing time for any configuration. A node configured OP_NONE only
// passes data. cfg must stay constant while a batch is in the column.
module solar_node
  import solar_pkg::*;
#(
  parameter int unsigned L   = 20,  // column length, C*N
  parameter int unsigned POS = 5    // read/write position, 1..L
) (
  input  logic      clk,
  input  logic      rst,
  input  node_cfg_t cfg,
  input  phase_t    phase,   // 0 .. 3L-1
  input  data_t     tap_i,   // register 1
  output data_t     out_o,   // to register 2
  output logic      rd_o,    // a slot was read this cycle
  output logic      wr_o     // a slot was replaced this cycle
);

  localparam int unsigned RD_END = POS + L;      // first phase after reading
  localparam int unsigned WR_END = POS + 2 * L;  // first phase after writing

  initial begin
    assert (POS >= 1 && POS <= L) else $error("solar_node: POS out of range");
    assert (WR_END <= 3 * L) else $error("solar_node: write window exceeds period");
  end

  logic  in_rd, in_wr;
  slot_t slot;
  logic  hit_a, hit_b;
  data_t a_q, b_q, alu_y;

  always_comb begin
    int unsigned rel;
    in_rd = (phase >= phase_t'(POS))    && (phase < phase_t'(RD_END));
    in_wr = (phase >= phase_t'(RD_END)) && (phase < phase_t'(WR_END));
    rel   = 32'(phase) + 2 * L - POS;   // non-negative for every phase
    slot  = slot_t'(rel % L);
    hit_a = (cfg.op != OP_NONE) && (slot == cfg.slot_a);
    hit_b = is_binary(cfg.op)   && (slot == cfg.slot_b);
  end

  node_alu u_alu (.op(cfg.op), .a(a_q), .b(b_q), .y(alu_y));

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q <= '0;
      b_q <= '0;
    end else begin
      if (in_rd && hit_a) a_q <= tap_i;
      if (in_rd && hit_b) b_q <= tap_i;
    end
  end

  assign rd_o  = in_rd && (hit_a || hit_b);
  assign wr_o  = in_wr && (hit_a || hit_b);
  // the operand registers hold still from the end of the read window on, so
  // the result is ready for the whole write window
  assign out_o = wr_o ? alu_y : tap_i;

endmodule
