// barrel_stage: one bypass/shift unit of the logarithmic barrel shifter.
//
// When en (one bit of the shift count) is 0 the word passes unchanged;
// when 1 it is moved by SHIFT bit positions:
//   dir = 0, arith_logic = 0  shift left, zeros in
//   dir = 1, arith_logic = 0  shift right, sign bit copied in
//   dir = 0, arith_logic = 1  rotate left
//   dir = 1, arith_logic = 1  rotate right
// The document names the dir and arithLogic controls but not their meaning;
// this mapping is the one that reproduces its tabulated results for the
// input 0xCE5B (shift by 1: 9CB6, 9CB7, E72D, E72D; by 7: 2D80, 2DE7, FF9C,
// B79C). Combinational.
module barrel_stage #(
  parameter int unsigned W     = 16,
  parameter int unsigned SHIFT = 1
) (
  input  logic [W-1:0] din,
  input  logic         en,
  input  logic         dir,
  input  logic         arith_logic,
  output logic [W-1:0] dout
);

  logic [W-1:0] moved;

  always_comb begin
    unique case ({dir, arith_logic})
      2'b00: moved = din << SHIFT;
      2'b10: moved = W'($signed(din) >>> SHIFT);
      2'b01: moved = (din << SHIFT) | (din >> (W - SHIFT));
      2'b11: moved = (din >> SHIFT) | (din << (W - SHIFT));
      default: moved = din;
    endcase
    dout = en ? moved : din;
  end

endmodule
