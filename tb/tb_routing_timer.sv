// tb_routing_timer: checks that the phase counts 0 .. 3L-1 and wraps, that
// fill is high exactly in phases 0 .. L-1 and period_end only in phase 3L-1,
// and that the period is 3L cycles.
module tb_routing_timer;
  import solar_pkg::*;
  localparam int L = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  phase_t phase;
  logic fill, pend;

  routing_timer #(.L(L)) dut (.clk(clk), .rst(rst), .phase_o(phase), .fill_o(fill), .period_end_o(pend));

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s phase=%0d", what, phase); end
  endtask

  initial begin
    static int ends = 0, last_end = -1;
    rst = 1; @(posedge clk); #1; rst = 0;
    for (int c = 0; c < 10 * L; c++) begin
      chk(int'(phase) == c % (3 * L), "phase value");
      chk(fill == ((c % (3 * L)) < L), "fill");
      chk(pend == ((c % (3 * L)) == 3 * L - 1), "period_end");
      if (pend) begin
        if (last_end >= 0) chk(c - last_end == 3 * L, "period length");
        last_end = c; ends++;
      end
      @(posedge clk); #1;
    end
    chk(ends == 3, "number of periods");
    rst = 1; @(posedge clk); #1; rst = 0;
    chk(phase == 0, "reset");
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
