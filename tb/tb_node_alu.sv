// tb_node_alu: exhaustive self-checking test of the node arithmetic.
// Every unary function is checked for all 256 inputs and the binary ones for
// random pairs, against reference values computed with integer arithmetic
// from the defining formulas. Also checks the worked values Em(192) = 64,
// Am(47,57) = 51 and Lm(2^i) = 32*i.
module tb_node_alu;
  import solar_pkg::*;
  int checks = 0, failures = 0;
  node_op_e op;
  data_t a, b, y;

  node_alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic int r_em(int x);
    return ((32 + (x % 32)) * (1 << (x / 32))) / 32;
  endfunction
  function automatic int r_lm(int x);
    int li = 0;
    if (x == 0) return 0;
    for (int i = 0; i < 8; i++) if (x >= (1 << i)) li = i;
    return 32 * li + (32 * (x - (1 << li))) / (1 << li);
  endfunction
  function automatic int r_sig(int x);
    if (x < 128) return r_em(128 + x) / 2;
    return 255 - r_em(128 + (255 - x)) / 2;
  endfunction

  task automatic chk(node_op_e o, int x, int z, int exp);
    op = o; a = 8'(x); b = 8'(z); #1;
    checks++;
    if (int'(y) != exp) begin
      failures++;
      $display("FAIL op=%s a=%0d b=%0d got %0d exp %0d", o.name(), x, z, y, exp);
    end
  endtask

  initial begin
    chk(OP_EXP, 192, 0, 64);
    chk(OP_ADD, 47, 57, 51);
    for (int i = 0; i < 8; i++) chk(OP_LOG, 1 << i, 0, 32 * i);
    chk(OP_LOG, 0, 0, 0);
    for (int x = 0; x < 256; x++) begin
      chk(OP_IDENT, x, 0, x);
      chk(OP_NONE,  x, 0, x);
      chk(OP_HALF,  x, 0, x / 2);
      chk(OP_EXP,   x, 0, r_em(x));
      chk(OP_LOG,   x, 0, r_lm(x));
      chk(OP_SIG,   x, 0, r_sig(x));
    end
    for (int r = 0; r < 2000; r++) begin
      automatic int p = $urandom_range(255);
      automatic int q = $urandom_range(255);
      chk(OP_ADD, p, q, p / 2 + q / 2);
      chk(OP_SUB, p, q, (p >= q) ? p - q : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
