// solar_pkg: types shared by the SOLAR routing-channel pipeline.
//
// The routing channel carries 8-bit unsigned data. Each node is configured
// with one operation and up to two slot numbers (stream positions 0..L-1)
// that it reads from and later writes its result back to. The operation set
// (half, identity, log, exp, sigmoid, add, sub) is the document's; the 3-bit
// encoding, the "none" code for a node that only passes data, and the 8-bit
// slot field are this design's choices. The phase of the 3L-cycle column
// period is carried on PHASE_W bits.
package solar_pkg;

  localparam int unsigned DATA_W  = 8;
  localparam int unsigned SLOT_W  = 8;
  localparam int unsigned PHASE_W = 16;

  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [SLOT_W-1:0]  slot_t;
  typedef logic [PHASE_W-1:0] phase_t;

  typedef enum logic [2:0] {
    OP_NONE  = 3'd0,  // node reads nothing and writes nothing
    OP_IDENT = 3'd1,  // unary: identity
    OP_HALF  = 3'd2,  // unary: x/2
    OP_LOG   = 3'd3,  // unary: Lm(x)
    OP_EXP   = 3'd4,  // unary: Em(x)
    OP_SIG   = 3'd5,  // unary: modified sigmoid
    OP_ADD   = 3'd6,  // binary: Am(a,b) = a/2 + b/2
    OP_SUB   = 3'd7   // binary: Sm(a,b) = a-b if a>=b else 0
  } node_op_e;

  typedef struct packed {
    node_op_e op;
    slot_t    slot_a;  // first (or only) operand slot
    slot_t    slot_b;  // second operand slot, binary operations only
  } node_cfg_t;

  function automatic logic is_binary(node_op_e op);
    return (op == OP_ADD) || (op == OP_SUB);
  endfunction

endpackage
