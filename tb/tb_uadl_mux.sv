// tb_uadl_mux: self-checking test of the 8-bit example multiplexer.
module tb_uadl_mux;
  int checks = 0, failures = 0;
  logic [7:0] d1, d2, dout;
  logic sel;

  uadl_mux dut (.d1(d1), .d2(d2), .select(sel), .dout(dout));

  initial begin
    for (int r = 0; r < 300; r++) begin
      d1 = 8'($urandom); d2 = 8'($urandom); sel = 1'($urandom); #1;
      checks++;
      if (dout !== (sel ? d2 : d1)) begin
        failures++;
        $display("FAIL sel=%0d d1=%h d2=%h got %h", sel, d1, d2, dout);
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
