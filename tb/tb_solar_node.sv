// tb_solar_node: self-checking test of one routing-channel node.
// The testbench plays the column around the node: it drives the period
// phase and, in register 1, the stream slot (phase - POS) mod L. First the
// worked example: a node adding slots 4 and 5 holding 47 and 57 must emit
// Am(47,57) = 51 in both slots one pass later, with the reads in phases
// POS+4, POS+5 and the writes exactly L cycles after them. Then random
// configurations and data over several periods, including OP_NONE.
module tb_solar_node;
  import solar_pkg::*;
  localparam int C = 5, N = 4, L = C * N, POS = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  node_cfg_t cfg;
  phase_t phase;
  data_t tap, out;
  logic rd, wr;

  solar_node #(.L(L), .POS(POS)) dut (
    .clk(clk), .rst(rst), .cfg(cfg), .phase(phase), .tap_i(tap), .out_o(out), .rd_o(rd), .wr_o(wr));

  always #5 clk = ~clk;

  function automatic int r_em(int x);
    return ((32 + (x % 32)) * (1 << (x / 32))) / 32;
  endfunction
  function automatic int r_lm(int x);
    int li = 0;
    if (x == 0) return 0;
    for (int i = 0; i < 8; i++) if (x >= (1 << i)) li = i;
    return 32 * li + (32 * (x - (1 << li))) / (1 << li);
  endfunction
  function automatic int r_op(node_op_e o, int p, int q);
    case (o)
      OP_IDENT: return p;
      OP_HALF:  return p / 2;
      OP_LOG:   return r_lm(p);
      OP_EXP:   return r_em(p);
      OP_SIG:   return (p < 128) ? r_em(128 + p) / 2 : 255 - r_em(128 + 255 - p) / 2;
      OP_ADD:   return p / 2 + q / 2;
      OP_SUB:   return (p >= q) ? p - q : 0;
      default:  return p;
    endcase
  endfunction

  // one period with stream data d; checks every cycle
  task automatic run_period(data_t d [L], int first_rd, int first_wr);
    int exp_res, nrd = 0, nwr = 0, t_rd = -1, t_wr = -1;
    logic bin;
    bin = is_binary(cfg.op);
    exp_res = r_op(cfg.op, d[cfg.slot_a], d[cfg.slot_b]);
    for (int t = 0; t < 3 * L; t++) begin
      int s;
      logic hit, win_rd, win_wr;
      phase = phase_t'(t);
      s = (t - POS + 2 * L) % L;
      tap = (t >= POS) ? d[s] : 8'd0;
      #1;
      win_rd = (t >= POS) && (t < POS + L);
      win_wr = (t >= POS + L) && (t < POS + 2 * L);
      hit = (cfg.op != OP_NONE) && ((s == cfg.slot_a) || (bin && s == cfg.slot_b));
      checks++;
      if (out !== ((win_wr && hit) ? 8'(exp_res) : tap)) begin
        failures++;
        $display("FAIL t=%0d slot=%0d op=%s out=%0d exp %0d", t, s, cfg.op.name(), out,
                 (win_wr && hit) ? exp_res : tap);
      end
      checks++;
      if (rd !== (win_rd && hit) || wr !== (win_wr && hit)) begin
        failures++;
        $display("FAIL strobes t=%0d rd=%0d wr=%0d", t, rd, wr);
      end
      if (rd) begin nrd++; if (t_rd < 0) t_rd = t; end
      if (wr) begin nwr++; if (t_wr < 0) t_wr = t; end
      @(posedge clk);
    end
    if (first_rd >= 0) begin
      checks++;
      if (t_rd != first_rd || t_wr != first_wr) begin
        failures++;
        $display("FAIL timing: first read %0d (exp %0d), first write %0d (exp %0d)", t_rd, first_rd, t_wr, first_wr);
      end
    end
    checks++;
    if (nrd != nwr) begin failures++; $display("FAIL %0d reads but %0d writes", nrd, nwr); end
  endtask

  initial begin
    data_t d [L];
    rst = 1; phase = 0; tap = 0;
    cfg = '{op: OP_NONE, slot_a: 0, slot_b: 0};
    @(posedge clk); #1; rst = 0;
    #1 @(negedge clk);
    // worked example
    for (int i = 0; i < L; i++) d[i] = 8'($urandom);
    d[4] = 8'd47; d[5] = 8'd57;
    cfg = '{op: OP_ADD, slot_a: 8'd4, slot_b: 8'd5};
    run_period(d, POS + 4, POS + L + 4);
    // random
    for (int r = 0; r < 60; r++) begin
      for (int i = 0; i < L; i++) d[i] = 8'($urandom);
      cfg.op = node_op_e'($urandom_range(7));
      cfg.slot_a = 8'($urandom_range(L - 1));
      cfg.slot_b = 8'($urandom_range(L - 1));
      if (r % 4 == 0) cfg.slot_a = 8'd0;   // first slot of the write window
      run_period(d, -1, -1);
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
