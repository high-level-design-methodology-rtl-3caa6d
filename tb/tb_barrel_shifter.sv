// tb_barrel_shifter: self-checking test of the 3-stage barrel shifter.
// Checks the published results for input 0xCE5B shifted by 1 and by 7 in all
// four (dir, arith_logic) modes, then every shift count and mode for random
// words against a reference model written with concatenation.
module tb_barrel_shifter;
  int checks = 0, failures = 0;
  logic [15:0] din, dout, s1;
  logic [2:0]  ns;
  logic        dir, al;

  barrel_shifter dut (.din(din), .num_shift(ns), .dir(dir), .arith_logic(al), .dout(dout), .stage1_o(s1));

  function automatic logic [15:0] ref_shift(logic [15:0] x, int n, logic d, logic a);
    logic [31:0] dbl;
    dbl = {x, x};
    if (n == 0) return x;
    if (!d && !a) return x << n;
    if ( d && !a) return 16'($signed(x) >>> n);
    if (!d &&  a) begin dbl = dbl << n; return dbl[31:16]; end
    dbl = dbl >> n; return dbl[15:0];
  endfunction

  task automatic chk(logic [15:0] exp, string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: din=%h n=%0d dir=%0d al=%0d got %h exp %h", what, din, ns, dir, al, dout, exp);
    end
  endtask

  initial begin
    static logic [15:0] t1 [4] = '{16'h9CB6, 16'h9CB7, 16'hE72D, 16'hE72D};
    static logic [15:0] t7 [4] = '{16'h2D80, 16'h2DE7, 16'hFF9C, 16'hB79C};
    din = 16'hCE5B;
    for (int m = 0; m < 4; m++) begin
      {dir, al} = 2'(m);
      ns = 3'd1; #1; chk(t1[m], "table 1-stage");
      ns = 3'd7; #1; chk(t7[m], "table 3-stage");
    end
    for (int r = 0; r < 200; r++) begin
      din = 16'($urandom);
      for (int m = 0; m < 4; m++)
        for (int n = 0; n < 8; n++) begin
          {dir, al} = 2'(m); ns = 3'(n); #1;
          chk(ref_shift(din, n, dir, al), "random");
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
