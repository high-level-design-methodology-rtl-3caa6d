// tb_drpu_cell: self-checking test of the configured DRPU cell: add and
// subtract with saturation at -128/127, max and min, one cycle of latency.
module tb_drpu_cell;
  import draw_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  drpu_op_e cfg;
  metric_t a, b, y;

  drpu_cell dut (.clk(clk), .rst(rst), .cfg(cfg), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  function automatic int sat(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  initial begin
    int ea, eb, exp_v;
    rst = 1; cfg = DRPU_ADD; a = 0; b = 0;
    @(posedge clk); #1; rst = 0;
    for (int r = 0; r < 2000; r++) begin
      cfg = drpu_op_e'($urandom_range(3));
      if (r < 8) begin a = (r % 2) ? 8'sd100 : -8'sd100; b = (r % 2) ? 8'sd90 : -8'sd90; end
      else begin a = 8'($urandom); b = 8'($urandom); end
      ea = int'(a); eb = int'(b);
      case (cfg)
        DRPU_ADD: exp_v = sat(ea + eb);
        DRPU_SUB: exp_v = sat(ea - eb);
        DRPU_MAX: exp_v = (ea > eb) ? ea : eb;
        default:  exp_v = (ea < eb) ? ea : eb;
      endcase
      @(posedge clk); #1;
      // one cycle after presenting the operands
      checks++;
      if (int'(y) != exp_v) begin
        failures++;
        $display("FAIL %s a=%0d b=%0d got %0d exp %0d", cfg.name(), ea, eb, y, exp_v);
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
