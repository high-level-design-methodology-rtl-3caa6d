// tb_solar_column: self-checking test of one routing-channel column at its
// default size (4 nodes, copy ratio 5, 4 data, L = 20).
// Each period a random batch of L slots is streamed in while random node
// configurations are applied; the batch that leaves in the next period is
// compared slot by slot with a reference: every node computes from the
// batch as it entered, and its result replaces its slots, a later node
// overwriting an earlier one. Also checks that each node reads and writes
// the expected number of slots and that a batch leaves exactly 3L cycles
// after it entered.
module tb_solar_column;
  import solar_pkg::*;
  localparam int K = 4, C = 5, N = 4, L = C * N;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  phase_t phase;
  logic fill, pend;
  node_cfg_t [K-1:0] cfg;
  data_t din, dout;
  logic [K-1:0] rd, wr;

  routing_timer #(.L(L)) u_t (.clk(clk), .rst(rst), .phase_o(phase), .fill_o(fill), .period_end_o(pend));
  solar_column #(.K(K), .C(C), .N(N)) dut (
    .clk(clk), .rst(rst), .phase(phase), .fill(fill), .cfg(cfg), .din(din), .dout(dout), .rd_o(rd), .wr_o(wr));

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

  data_t cur [L], expq [L];
  node_cfg_t [K-1:0] cfgq;
  int nrd [K], nwr [K];

  task automatic model(input data_t d [L], input node_cfg_t [K-1:0] c, output data_t o [L]);
    o = d;
    for (int i = 0; i < K; i++) begin
      int res;
      if (c[i].op == OP_NONE) continue;
      res = r_op(c[i].op, d[c[i].slot_a], d[c[i].slot_b]);
      o[c[i].slot_a] = 8'(res);
      if (is_binary(c[i].op)) o[c[i].slot_b] = 8'(res);
    end
  endtask

  initial begin
    static logic have_prev = 0;
    static int first_in = -1, first_out = -1, cyc = 0;
    rst = 1; din = 0; cfg = '0;
    @(posedge clk); #1; rst = 0;
    for (int p = 0; p < 40; p++) begin
      // new batch and configuration for this period
      for (int i = 0; i < L; i++) cur[i] = 8'($urandom);
      for (int i = 0; i < K; i++) begin
        cfg[i].op = node_op_e'($urandom_range(7));
        cfg[i].slot_a = 8'($urandom_range(L - 1));
        cfg[i].slot_b = 8'($urandom_range(L - 1));
        nrd[i] = 0; nwr[i] = 0;
      end
      if (p == 0) begin
        cfg[0] = '{op: OP_ADD, slot_a: 8'd4, slot_b: 8'd5};
        cur[4] = 8'd47; cur[5] = 8'd57;
      end
      for (int t = 0; t < 3 * L; t++) begin
        checks++;
        if (int'(phase) != t) begin failures++; $display("FAIL phase %0d exp %0d", phase, t); end
        din = (t < L) ? cur[t] : 8'd0;
        #1;
        if (t == 0 && p == 0) first_in = cyc;
        if (have_prev && t < L) begin
          checks++;
          if (dout !== expq[t]) begin
            failures++;
            $display("FAIL period %0d slot %0d: got %0d exp %0d", p, t, dout, expq[t]);
          end
          if (p == 1 && t == 0) first_out = cyc;
        end
        for (int i = 0; i < K; i++) begin nrd[i] += int'(rd[i]); nwr[i] += int'(wr[i]); end
        @(posedge clk); #1; cyc++;
      end
      for (int i = 0; i < K; i++) begin
        automatic int exp_n = (cfg[i].op == OP_NONE) ? 0 :
                    (is_binary(cfg[i].op) && cfg[i].slot_a != cfg[i].slot_b) ? 2 : 1;
        checks++;
        if (nrd[i] != exp_n || nwr[i] != exp_n) begin
          failures++;
          $display("FAIL node %0d: %0d reads, %0d writes, exp %0d", i, nrd[i], nwr[i], exp_n);
        end
      end
      model(cur, cfg, expq);
      have_prev = 1;
    end
    checks++;
    if (first_out - first_in != 3 * L) begin
      failures++;
      $display("FAIL column delay %0d, exp %0d", first_out - first_in, 3 * L);
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
