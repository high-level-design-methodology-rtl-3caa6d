// uadl_mux: the 8-bit two-way multiplexer used as the introductory example
// of the unified algorithmic description flow. dout is d1 when select is 0
// and d2 when it is 1; the widths (8-bit data, 1-bit select) are the
// document's. Combinational.
module uadl_mux (
  input  logic [7:0] d1,
  input  logic [7:0] d2,
  input  logic       select,
  output logic [7:0] dout
);

  always_comb begin
    if (select == 1'b0) dout = d1;
    else                dout = d2;
  end

endmodule
