// tb_alpha_unit: self-checking test of the Max-Log-MAP state-metric unit.
// A new random input set and sign configuration is presented every cycle;
// each result must appear exactly 5 cycles later and equal a reference
// computed with the same saturating 8-bit steps. Small-magnitude inputs are
// also checked against the plain formula without saturation.
module tb_alpha_unit;
  import draw_pkg::*;
  localparam int LAT = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [6:0] sub_cfg;
  metric_t s1, s2, s1p, s2p, lam, ai, aj, am;

  alpha_unit dut (.clk(clk), .rst(rst), .sub_cfg(sub_cfg), .s1(s1), .s2(s2), .s1p(s1p), .s2p(s2p),
                  .lambda(lam), .alpha_i(ai), .alpha_j(aj), .alpha_m(am));

  always #5 clk = ~clk;

  function automatic int sat(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction
  function automatic int pm(logic sub, int x, int y);
    return sat(sub ? x - y : x + y);
  endfunction

  int expq [$];
  int plainq [$];

  initial begin
    rst = 1; sub_cfg = 0; {s1, s2, s1p, s2p, lam, ai, aj} = '0;
    repeat (2) @(posedge clk); #1; rst = 0;
    for (int c = 0; c < 3000 + LAT; c++) begin
      if (c < 3000) begin
        int m0, gi, gj, e, is_small;
        is_small = (c % 2);
        sub_cfg = 7'($urandom);
        if (is_small) begin
          s1 = 8'($signed(4'($urandom))); s2 = 8'($signed(4'($urandom)));
          s1p = 8'($signed(4'($urandom))); s2p = 8'($signed(4'($urandom)));
          lam = 8'($signed(4'($urandom))); ai = 8'($signed(4'($urandom))); aj = 8'($signed(4'($urandom)));
        end else begin
          s1 = 8'($urandom); s2 = 8'($urandom); s1p = 8'($urandom); s2p = 8'($urandom);
          lam = 8'($urandom); ai = 8'($urandom); aj = 8'($urandom);
        end
        m0 = (int'(lam) > 0) ? int'(lam) : 0;
        gi = pm(sub_cfg[2], pm(sub_cfg[1], pm(sub_cfg[0], s1, s2), lam), m0);
        gj = pm(sub_cfg[5], pm(sub_cfg[4], s1p, s2p), m0);
        e  = pm(sub_cfg[3], ai, gi);
        if (pm(sub_cfg[6], aj, gj) > e) e = pm(sub_cfg[6], aj, gj);
        expq.push_back(e);
        if (is_small) begin
          int sg [7], p_i, p_j;
          for (int k = 0; k < 7; k++) sg[k] = sub_cfg[k] ? -1 : 1;
          p_i = int'(ai) + sg[3] * (int'(s1) + sg[0] * int'(s2) + sg[1] * int'(lam) + sg[2] * m0);
          p_j = int'(aj) + sg[6] * (int'(s1p) + sg[4] * int'(s2p) + sg[5] * m0);
          plainq.push_back((p_i > p_j) ? p_i : p_j);
        end else plainq.push_back(1000);
      end
      @(posedge clk); #1;
      if (c >= LAT - 1 && expq.size() > 0 && c - (LAT - 1) < 3000) begin
        automatic int e = expq.pop_front();
        automatic int p = plainq.pop_front();
        checks++;
        if (int'(am) != e) begin
          failures++;
          $display("FAIL cycle %0d: got %0d exp %0d", c, am, e);
        end
        if (p != 1000) begin
          checks++;
          if (int'(am) != p) begin failures++; $display("FAIL plain cycle %0d: got %0d exp %0d", c, am, p); end
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
