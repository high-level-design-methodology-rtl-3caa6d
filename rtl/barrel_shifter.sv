// barrel_shifter: the 3-stage logarithmic barrel shifter of the DRAP unit.
//
// The DRAW datapath is 16 bits wide and scaling needs shifts of 0..7 bits,
// so three bypass/shift units are chained: stage k moves the word by 2^k
// when bit k of num_shift is set. dir selects left (0) or right (1),
// arith_logic selects shift (0, sign-filling when right) or rotate (1); see
// barrel_stage. stage1_o exposes the output of the first stage. The structure
// and widths are the document's; it is combinational, as a logarithmic
// shifter that scales in a single operation.
module barrel_shifter #(
  parameter int unsigned W      = 16,
  parameter int unsigned STAGES = 3
) (
  input  logic [W-1:0]      din,
  input  logic [STAGES-1:0] num_shift,
  input  logic              dir,
  input  logic              arith_logic,
  output logic [W-1:0]      dout,
  output logic [W-1:0]      stage1_o
);

  logic [W-1:0] st [STAGES+1];

  assign st[0] = din;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    barrel_stage #(.W(W), .SHIFT(2 ** k)) u_stage (
      .din(st[k]), .en(num_shift[k]), .dir(dir), .arith_logic(arith_logic),
      .dout(st[k+1])
    );
  end

  assign dout     = st[STAGES];
  assign stage1_o = st[1];

endmodule
