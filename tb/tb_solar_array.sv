// tb_solar_array: end-to-end test of the 4 x 7 routing-channel array at its
// default size (4 nodes per column, copy ratio 5, 4 inputs, L = 20).
// It streams 150 four-feature samples (the size of the Iris set, generated
// here as three noisy clusters scaled to [0,255]) through a fixed random node
// configuration, with a few idle periods mixed in, and checks:
//   - every output slot of every sample against a reference that applies the
//     columns one after another (each node computes from the batch as it
//     entered its column; its result replaces its slots, a later node in the
//     same column overwriting an earlier one)
//   - out_valid exactly for the accepted samples, in order
//   - latency COLS*3L from acceptance to the first output slot, and one
//     sample per 3L cycles
// It counts the read, write, fill, circulate and idle-period events and
// fails if any of them never happened.
module tb_solar_array;
  import solar_pkg::*;
  localparam int K = 4, COLS = 7, C = 5, N = 4, L = C * N, NS = 150;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  node_cfg_t [COLS-1:0][K-1:0] cfg;
  data_t [N-1:0] in_data;
  logic in_valid, in_ready, out_valid;
  data_t out_data;
  slot_t out_slot;
  logic [COLS-1:0][K-1:0] nrd, nwr;

  solar_array dut (
    .clk(clk), .rst(rst), .cfg(cfg), .in_data(in_data), .in_valid(in_valid), .in_ready(in_ready),
    .out_data(out_data), .out_slot(out_slot), .out_valid(out_valid), .node_rd(nrd), .node_wr(nwr));

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

  typedef data_t [L-1:0] batch_t;
  batch_t expq [$];

  function automatic batch_t model(data_t [N-1:0] x);
    batch_t d, o;
    for (int s = 0; s < L; s++) d[s] = x[s / C];
    for (int c = 0; c < COLS; c++) begin
      o = d;
      for (int i = 0; i < K; i++) begin
        automatic node_cfg_t n = cfg[c][i];
        int res;
        if (n.op == OP_NONE) continue;
        res = r_op(n.op, d[n.slot_a], d[n.slot_b]);
        o[n.slot_a] = 8'(res);
        if (is_binary(n.op)) o[n.slot_b] = 8'(res);
      end
      d = o;
    end
    return d;
  endfunction

  int n_rd = 0, n_wr = 0, n_fill = 0, n_circ = 0, n_idle = 0, n_out = 0;
  int acc_cycle [$];
  int cyc = 0;

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    foreach (nrd[c, i]) begin n_rd += int'(nrd[c][i]); n_wr += int'(nwr[c][i]); end
    if (dut.fill) n_fill++; else n_circ++;
  end

  // stimulus: offer samples at every in_ready, with an idle period now and then
  initial begin
    static int sent = 0;
    rst = 1; in_valid = 0; in_data = '0;
    // configuration: every operation appears; slots picked at random
    for (int c = 0; c < COLS; c++)
      for (int i = 0; i < K; i++) begin
        cfg[c][i].op     = node_op_e'((c * K + i) % 8);
        cfg[c][i].slot_a = 8'($urandom_range(L - 1));
        cfg[c][i].slot_b = 8'($urandom_range(L - 1));
      end
    repeat (2) @(posedge clk); #1; rst = 0;
    while (sent < NS) begin
      @(negedge clk);
      if (in_ready) begin
        if (sent % 37 == 5 && !in_valid) begin
          in_valid = 0; n_idle++;
          @(posedge clk); #1;
          in_valid = 1;
        end else begin
          automatic int cls = sent % 3;
          for (int f = 0; f < N; f++) begin
            automatic int v = 40 + 70 * cls + 15 * f + $urandom_range(40) - 20;
            in_data[f] = 8'((v < 0) ? 0 : (v > 255) ? 255 : v);
          end
          in_valid = 1;
          expq.push_back(model(in_data));
          acc_cycle.push_back(cyc);
          sent++;
          @(posedge clk); #1;
          in_valid = 0;
        end
      end
    end
    in_valid = 0;
  end

  // checker
  initial begin
    static int prev_first = -1;
    int acc;
    batch_t e;
    @(negedge rst);
    forever begin
      @(negedge clk);
      if (out_valid) begin
        e   = expq.pop_front();
        acc = acc_cycle.pop_front();
        checks++;
        if (cyc - acc != COLS * 3 * L + 1) begin
          failures++;
          $display("FAIL latency %0d, exp %0d", cyc - acc, COLS * 3 * L + 1);
        end
        if (prev_first >= 0 && (cyc - prev_first) % (3 * L) != 0) begin
          checks++; failures++;
          $display("FAIL sample spacing %0d not a multiple of 3L", cyc - prev_first);
        end
        prev_first = cyc;
        for (int s = 0; s < L; s++) begin
          checks++;
          if (!out_valid || int'(out_slot) != s || out_data !== e[s]) begin
            failures++;
            $display("FAIL sample %0d slot %0d: valid=%0d slot=%0d got %0d exp %0d",
                     n_out, s, out_valid, out_slot, out_data, e[s]);
          end
          @(negedge clk);
        end
        checks++;
        if (out_valid) begin failures++; $display("FAIL out_valid longer than L"); end
        n_out++;
        if (n_out == NS) begin
          checks++;
          if (n_rd == 0 || n_wr == 0 || n_fill == 0 || n_circ == 0 || n_idle == 0) begin
            failures++;
          end
          $display("events: reads=%0d writes=%0d fill=%0d circulate=%0d idle_periods=%0d samples=%0d",
                   n_rd, n_wr, n_fill, n_circ, n_idle, n_out);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog: %0d samples out", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
