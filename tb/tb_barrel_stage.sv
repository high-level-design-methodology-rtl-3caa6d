// tb_barrel_stage: self-checking test of one bypass/shift unit (shift by 1).
// Checks the published one-stage results for 0xCE5B, the bypass case, and
// random words against a reference model.
module tb_barrel_stage;
  int checks = 0, failures = 0;
  logic [15:0] din, dout;
  logic en, dir, al;

  barrel_stage #(.W(16), .SHIFT(1)) dut (.din(din), .en(en), .dir(dir), .arith_logic(al), .dout(dout));

  task automatic chk(logic [15:0] exp);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL din=%h en=%0d dir=%0d al=%0d got %h exp %h", din, en, dir, al, dout, exp);
    end
  endtask

  initial begin
    static logic [15:0] t1 [4] = '{16'h9CB6, 16'h9CB7, 16'hE72D, 16'hE72D};
    din = 16'hCE5B; en = 1;
    for (int m = 0; m < 4; m++) begin {dir, al} = 2'(m); #1; chk(t1[m]); end
    for (int r = 0; r < 500; r++) begin
      logic [15:0] e;
      din = 16'($urandom); {en, dir, al} = 3'($urandom); #1;
      if (!en)             e = din;
      else if (!dir && !al) e = {din[14:0], 1'b0};
      else if ( dir && !al) e = {din[15], din[15:1]};
      else if (!dir &&  al) e = {din[14:0], din[15]};
      else                  e = {din[0], din[15:1]};
      chk(e);
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
