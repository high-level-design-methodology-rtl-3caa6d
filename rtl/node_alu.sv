// node_alu: arithmetic of a SOLAR routing-channel node.
//
// All values are 8-bit unsigned and every function maps [0,255] into [0,255],
// so no overflow can occur anywhere in the array:
//   half      x/2 (truncated)
//   identity  x
//   Lm(x)     32*(Li(x) + frac(x / 2^Li(x))), Li(x) = position of the leading
//             one (Li(0) = 0); the fraction is truncated to 5 bits
//   Em(x)     (1 + x[4:0]/32) * 2^x[7:5], truncated: the 5 LSBs plus an
//             implicit leading one, shifted left by the 3 MSBs
//   sigmoid   odd-symmetric curve around 128 built from Em: for x < 128 it is
//             Em(128 + x[6:0]) / 2, for x >= 128 it is 255 - Em(128 + ~x[6:0]) / 2
//   Am(a,b)   a/2 + b/2, each half truncated
//   Sm(a,b)   a - b when a >= b, else 0
// Half, identity, Lm, Em, Am and Sm follow the document's formulas. The exact
// form of the sigmoid is this design's: the document states only that the MSB
// picks the sign and Em builds the curve, and the form above reproduces its
// plotted curve (about 8 at x = 0, 128 in the middle, about 247 at x = 255).
// Purely combinational; the node registers the result.
module node_alu
  import solar_pkg::*;
(
  input  node_op_e op,
  input  data_t    a,
  input  data_t    b,
  output data_t    y
);

  function automatic data_t em(data_t x);
    logic [13:0] s;
    s = {8'd0, 1'b1, x[4:0]} << x[7:5];  // 1.fffff, scaled by 32
    return s[12:5];
  endfunction

  function automatic data_t lm(data_t x);
    logic [2:0]  li;
    logic [12:0] frac;
    if (x == '0) return '0;
    li = 3'd0;
    for (int i = 1; i < 8; i++)
      if (x[i]) li = 3'(i);
    // (x - 2^li) * 32 / 2^li
    frac = ({5'd0, x} - (13'd1 << li)) << 5;
    frac = frac >> li;
    return {li, frac[4:0]};
  endfunction

  function automatic data_t sig(data_t x);
    data_t e;
    if (!x[7]) begin
      e = em({1'b1, x[6:0]});
      return {1'b0, e[7:1]};
    end else begin
      e = em({1'b1, ~x[6:0]});
      return 8'd255 - {1'b0, e[7:1]};
    end
  endfunction

  always_comb begin
    unique case (op)
      OP_NONE:  y = a;
      OP_IDENT: y = a;
      OP_HALF:  y = {1'b0, a[7:1]};
      OP_LOG:   y = lm(a);
      OP_EXP:   y = em(a);
      OP_SIG:   y = sig(a);
      OP_ADD:   y = {1'b0, a[7:1]} + {1'b0, b[7:1]};
      OP_SUB:   y = (a >= b) ? a - b : '0;
      default:  y = a;
    endcase
  end

endmodule
