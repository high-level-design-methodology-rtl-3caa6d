// tb_llr_unit: self-checking test of the 8-state LLR datapath.
// A random set of alpha, beta and gamma metrics for the bit-1 and bit-0
// transitions is presented every cycle; each LLR must appear exactly 6
// cycles later and equal the reference, computed with the same saturating
// 8-bit steps. Small-magnitude metrics are also checked against the plain
// formula max(a+g+b over s1) - max(a+g+b over s0).
module tb_llr_unit;
  import draw_pkg::*;
  localparam int NS = 8, LAT = 6, NV = 2000;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  metric_t alpha [2][NS], beta [2][NS], gamma [2][NS];
  metric_t llr;

  llr_unit #(.NS(NS)) dut (.clk(clk), .rst(rst), .alpha(alpha), .beta(beta), .gamma(gamma), .llr(llr));

  always #5 clk = ~clk;

  function automatic int sat(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  int expq [$];
  int plainq [$];

  initial begin
    rst = 1;
    for (int s = 0; s < 2; s++) for (int i = 0; i < NS; i++) begin alpha[s][i] = 0; beta[s][i] = 0; gamma[s][i] = 0; end
    repeat (2) @(posedge clk); #1; rst = 0;
    for (int c = 0; c < NV + LAT; c++) begin
      if (c < NV) begin
        int mx [2], px [2];
        logic sm;
        sm = c[0];
        for (int s = 0; s < 2; s++) begin
          mx[s] = -1000; px[s] = -1000;
          for (int i = 0; i < NS; i++) begin
            int v, pv;
            alpha[s][i] = sm ? 8'($signed(5'($urandom))) : 8'($urandom);
            beta[s][i]  = sm ? 8'($signed(5'($urandom))) : 8'($urandom);
            gamma[s][i] = sm ? 8'($signed(5'($urandom))) : 8'($urandom);
            v  = sat(sat(int'(alpha[s][i]) + int'(beta[s][i])) + int'(gamma[s][i]));
            pv = int'(alpha[s][i]) + int'(beta[s][i]) + int'(gamma[s][i]);
            if (v > mx[s]) mx[s] = v;
            if (pv > px[s]) px[s] = pv;
          end
        end
        expq.push_back(sat(mx[1] - mx[0]));
        plainq.push_back(sm ? px[1] - px[0] : 1000);
      end
      @(posedge clk); #1;
      if (c >= LAT - 1 && c - (LAT - 1) < NV) begin
        automatic int e = expq.pop_front();
        automatic int p = plainq.pop_front();
        checks++;
        if (int'(llr) != e) begin failures++; $display("FAIL cycle %0d: got %0d exp %0d", c, llr, e); end
        if (p != 1000) begin
          checks++;
          if (int'(llr) != p) begin failures++; $display("FAIL plain cycle %0d: got %0d exp %0d", c, llr, p); end
        end
      end
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
