// tb_reconfig_top: end-to-end test of every design in the top, with all
// parameters at their defaults.
//   SOLAR array: 30 samples through the 4 x 7 array with a configuration
//     that uses every node operation, one idle period, each output slot
//     checked against a column-by-column reference and the COLS*3L latency
//   barrel shifter: the published 0xCE5B results and random words in all
//     four modes
//   alpha and LLR units: random metrics every cycle, results checked at the
//     5 and 6 cycle latencies
//   comment filter: a C fragment with both comment styles, flag per char
//   MUX: random selections
// Every mechanism is counted (node reads and writes, column fill and
// circulation, idle period, each shifter mode, saturation in a DRPU, single-
// and multi-line comments); one that never happened is a failure.
module tb_reconfig_top;
  import solar_pkg::*;
  import draw_pkg::*;
  localparam int K = 4, COLS = 7, C = 5, N = 4, L = C * N, NSAMP = 30;
  int checks = 0, failures = 0;
  logic clk = 0, rst;

  node_cfg_t [6:0][3:0] sol_cfg;
  data_t [3:0] sol_in_data;
  logic sol_in_valid, sol_in_ready, sol_out_valid;
  data_t sol_out_data;
  slot_t sol_out_slot;
  logic [6:0][3:0] sol_node_rd, sol_node_wr;
  logic [15:0] bs_din, bs_dout, bs_stage1;
  logic [2:0] bs_num_shift;
  logic bs_dir, bs_arith_logic;
  logic [6:0] am_sub_cfg;
  metric_t am_s1, am_s2, am_s1p, am_s2p, am_lambda, am_alpha_i, am_alpha_j, am_alpha_m;
  metric_t llr_alpha [2][8], llr_beta [2][8], llr_gamma [2][8];
  metric_t llr_out;
  logic cf_ch_valid, cf_in_comment;
  logic [7:0] cf_ch;
  logic [7:0] mux_d1, mux_d2, mux_dout;
  logic mux_select;

  reconfig_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int sat(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction
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
  function automatic batch_t model(data_t [N-1:0] x);
    batch_t d, o;
    for (int s = 0; s < L; s++) d[s] = x[s / C];
    for (int c = 0; c < COLS; c++) begin
      o = d;
      for (int i = 0; i < K; i++) begin
        automatic node_cfg_t n = sol_cfg[c][i];
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

  // mechanism counters
  int n_rd = 0, n_wr = 0, n_fill = 0, n_circ = 0, n_idle = 0, n_out = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  int n_sat = 0, n_single = 0, n_multi = 0;
  int cyc = 0;
  logic solar_done = 0, others_done = 0;

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    foreach (sol_node_rd[c, i]) begin n_rd += int'(sol_node_rd[c][i]); n_wr += int'(sol_node_wr[c][i]); end
    if (dut.u_solar.fill) n_fill++; else n_circ++;
  end

  // ---------------- SOLAR array ----------------
  batch_t expq [$];
  int acc_q [$];

  initial begin : solar_stim
    static int sent = 0;
    sol_in_valid = 0; sol_in_data = '0;
    for (int c = 0; c < COLS; c++)
      for (int i = 0; i < K; i++) begin
        sol_cfg[c][i].op     = node_op_e'((c * K + i + 3) % 8);
        sol_cfg[c][i].slot_a = 8'((c * 7 + i * 5) % L);
        sol_cfg[c][i].slot_b = 8'((c * 3 + i * 11 + 1) % L);
      end
    @(negedge rst);
    while (sent < NSAMP) begin
      @(negedge clk);
      if (sol_in_ready) begin
        if (sent == 3 && n_idle == 0) begin
          n_idle++;
          @(posedge clk);
        end else begin
          for (int f = 0; f < N; f++) sol_in_data[f] = 8'($urandom);
          sol_in_valid = 1;
          expq.push_back(model(sol_in_data));
          acc_q.push_back(cyc);
          sent++;
          @(posedge clk); #1;
          sol_in_valid = 0;
        end
      end
    end
  end

  initial begin : solar_check
    batch_t e;
    int acc;
    @(negedge rst);
    while (n_out < NSAMP) begin
      @(negedge clk);
      if (sol_out_valid) begin
        e = expq.pop_front();
        acc = acc_q.pop_front();
        chk(cyc - acc == COLS * 3 * L + 1, "SOLAR latency");
        for (int s = 0; s < L; s++) begin
          checks++;
          if (!sol_out_valid || int'(sol_out_slot) != s || sol_out_data !== e[s]) begin
            failures++;
            $display("FAIL SOLAR sample %0d slot %0d got %0d exp %0d", n_out, s, sol_out_data, e[s]);
          end
          @(negedge clk);
        end
        n_out++;
      end
    end
    solar_done = 1;
  end

  // ---------------- DRAW, comment filter, MUX ----------------
  initial begin : others
    string text, mask;
    int aq [$], lq [$];
    bs_din = 0; bs_num_shift = 0; bs_dir = 0; bs_arith_logic = 0;
    am_sub_cfg = 0; {am_s1, am_s2, am_s1p, am_s2p, am_lambda, am_alpha_i, am_alpha_j} = '0;
    for (int s = 0; s < 2; s++) for (int i = 0; i < 8; i++) begin llr_alpha[s][i] = 0; llr_beta[s][i] = 0; llr_gamma[s][i] = 0; end
    cf_ch_valid = 0; cf_ch = 0; mux_d1 = 0; mux_d2 = 0; mux_select = 0;
    @(negedge rst);
    // barrel shifter, published values
    begin
      static logic [15:0] t1 [4] = '{16'h9CB6, 16'h9CB7, 16'hE72D, 16'hE72D};
      static logic [15:0] t7 [4] = '{16'h2D80, 16'h2DE7, 16'hFF9C, 16'hB79C};
      bs_din = 16'hCE5B;
      for (int m = 0; m < 4; m++) begin
        {bs_dir, bs_arith_logic} = 2'(m);
        bs_num_shift = 1; #1; chk(bs_dout == t1[m], "barrel 1-bit table");
        bs_num_shift = 7; #1; chk(bs_dout == t7[m], "barrel 7-bit table");
        chk(bs_stage1 == t1[m], "barrel first stage");
        n_mode[m]++;
      end
      for (int r = 0; r < 100; r++) begin
        logic [31:0] dbl;
        logic [15:0] e;
        int n;
        bs_din = 16'($urandom); n = $urandom_range(7); bs_num_shift = 3'(n);
        {bs_dir, bs_arith_logic} = 2'($urandom); #1;
        dbl = {bs_din, bs_din};
        case ({bs_dir, bs_arith_logic})
          2'b00: e = bs_din << n;
          2'b10: e = 16'($signed(bs_din) >>> n);
          2'b01: begin dbl = dbl << n; e = dbl[31:16]; end
          default: begin dbl = dbl >> n; e = dbl[15:0]; end
        endcase
        chk(bs_dout == e, "barrel random");
        n_mode[{bs_dir, bs_arith_logic}]++;
      end
    end
    // alpha and LLR, one new input set per cycle
    @(negedge clk);
    for (int c = 0; c < 200 + 6; c++) begin
      if (c < 200) begin
        int m0, gi, gj, e, mx [2];
        am_sub_cfg = 7'($urandom);
        am_s1 = 8'($urandom); am_s2 = 8'($urandom); am_s1p = 8'($urandom); am_s2p = 8'($urandom);
        am_lambda = 8'($urandom); am_alpha_i = 8'($urandom); am_alpha_j = 8'($urandom);
        m0 = (int'(am_lambda) > 0) ? int'(am_lambda) : 0;
        gi = sat(am_sub_cfg[0] ? am_s1 - am_s2 : am_s1 + am_s2);
        if (am_sub_cfg[0] ? (am_s1 - am_s2 != gi) : (am_s1 + am_s2 != gi)) n_sat++;
        gi = sat(am_sub_cfg[1] ? gi - am_lambda : gi + am_lambda);
        gi = sat(am_sub_cfg[2] ? gi - m0 : gi + m0);
        gj = sat(am_sub_cfg[4] ? am_s1p - am_s2p : am_s1p + am_s2p);
        gj = sat(am_sub_cfg[5] ? gj - m0 : gj + m0);
        gi = sat(am_sub_cfg[3] ? am_alpha_i - gi : am_alpha_i + gi);
        gj = sat(am_sub_cfg[6] ? am_alpha_j - gj : am_alpha_j + gj);
        aq.push_back((gi > gj) ? gi : gj);
        for (int s = 0; s < 2; s++) begin
          mx[s] = -1000;
          for (int i = 0; i < 8; i++) begin
            int v;
            llr_alpha[s][i] = 8'($urandom); llr_beta[s][i] = 8'($urandom); llr_gamma[s][i] = 8'($urandom);
            v = sat(sat(int'(llr_alpha[s][i]) + int'(llr_beta[s][i])) + int'(llr_gamma[s][i]));
            if (v > mx[s]) mx[s] = v;
          end
        end
        lq.push_back(sat(mx[1] - mx[0]));
      end
      @(negedge clk);
      if (c >= 4 && c - 4 < 200) begin
        automatic int ea = aq.pop_front();
        chk(int'(am_alpha_m) == ea, "alpha value at 5 cycles");
      end
      if (c >= 5 && c - 5 < 200) begin
        automatic int el = lq.pop_front();
        chk(int'(llr_out) == el, "LLR value at 6 cycles");
      end
    end
    // comment filter
    text = "int a; // note\nb = c/d; /* x * y **/ e;";
    mask = "000000001111110000000000011111111110000";
    for (int i = 0; i < text.len(); i++) begin
      cf_ch = text[i]; cf_ch_valid = 1; #1;
      chk(cf_in_comment == (mask[i] == "1"), $sformatf("comment flag at char %0d", i));
      if (dut.u_cf.state_q == 3'b010) n_single++;
      if (dut.u_cf.state_q == 3'b011) n_multi++;
      @(negedge clk);
    end
    cf_ch_valid = 0;
    // MUX
    for (int r = 0; r < 50; r++) begin
      mux_d1 = 8'($urandom); mux_d2 = 8'($urandom); mux_select = 1'($urandom); #1;
      chk(mux_dout == (mux_select ? mux_d2 : mux_d1), "mux");
    end
    others_done = 1;
  end

  initial begin
    rst = 1;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    wait (solar_done && others_done);
    $display("events: reads=%0d writes=%0d fill=%0d circulate=%0d idle=%0d samples=%0d",
             n_rd, n_wr, n_fill, n_circ, n_idle, n_out);
    $display("events: shifter modes %0d %0d %0d %0d, saturations %0d, single-line %0d, multi-line %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_sat, n_single, n_multi);
    chk(n_rd > 0, "node reads happened");
    chk(n_wr > 0, "node writes happened");
    chk(n_fill > 0 && n_circ > 0, "fill and circulation happened");
    chk(n_idle > 0, "idle period happened");
    for (int m = 0; m < 4; m++) chk(n_mode[m] > 0, "shifter mode used");
    chk(n_sat > 0, "DRPU saturation happened");
    chk(n_single > 0 && n_multi > 0, "both comment styles seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
