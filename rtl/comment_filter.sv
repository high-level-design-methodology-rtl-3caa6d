// comment_filter: finds the comments in a C/C++ source character stream.
//
// A Mealy state machine with five states, Init, R (a '/' seen), S (single-line
// comment), M (multi-line comment) and M2 (a '*' seen inside M), consumes one
// 8-bit character per cycle when ch_valid is high. in_comment is the output
// of the transition taken by the current character (combinational from state
// and ch): 1 for the characters of a comment after its opening '/', and 0 for
// the opening '/', the final '/' of "*/" and the newline that ends a "//"
// comment, as the document's transition outputs specify:
//   Init: '/' -> R :0               other -> Init :0
//   R:    '/' -> S :1   '*' -> M :1 other -> Init :0
//   S:    '\n' -> Init :0           other -> S :1
//   M:    '*' -> M2 :1              other -> M :1
//   M2:   '/' -> Init :0  '*' -> M2 :1  other -> M :1
// The document's diagram sends every non-'/' character in M2 back to M, while
// its code listing keeps a further '*' in M2; this follows the listing, which
// also ends comments such as "/* x **/" correctly. The Init self-loop is not
// drawn and is this design's reading. State codes follow the listing (Init
// 000, R 001, M 011, M2 100; S 010 is this design's). Reset is synchronous
// and active low, as in the listing.
module comment_filter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ch_valid,
  input  logic [7:0] ch,
  output logic       in_comment
);

  typedef enum logic [2:0] {
    INIT   = 3'b000,
    RDY    = 3'b001,
    SINGLE = 3'b010,
    MULTI  = 3'b011,
    MULTI2 = 3'b100
  } state_e;

  localparam logic [7:0] SLASH   = 8'h2F;
  localparam logic [7:0] STAR    = 8'h2A;
  localparam logic [7:0] NEWLINE = 8'h0A;

  state_e state_q, state_d;
  logic   out_d;

  always_comb begin
    state_d = state_q;
    out_d   = 1'b0;
    unique case (state_q)
      INIT:   if (ch == SLASH) state_d = RDY;
      RDY: begin
        if (ch == SLASH)     begin state_d = SINGLE; out_d = 1'b1; end
        else if (ch == STAR) begin state_d = MULTI;  out_d = 1'b1; end
        else                 state_d = INIT;
      end
      SINGLE: begin
        if (ch == NEWLINE) state_d = INIT;
        else               out_d   = 1'b1;
      end
      MULTI: begin
        out_d = 1'b1;
        if (ch == STAR) state_d = MULTI2;
      end
      MULTI2: begin
        if (ch == SLASH)     state_d = INIT;
        else begin
          out_d = 1'b1;
          if (ch != STAR) state_d = MULTI;
        end
      end
      default: state_d = INIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        state_q <= INIT;
    else if (ch_valid) state_q <= state_d;
  end

  assign in_comment = ch_valid && out_d;

endmodule
