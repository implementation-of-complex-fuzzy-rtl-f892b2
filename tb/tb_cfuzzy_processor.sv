// tb_cfuzzy_processor: end-to-end run of the top at its default sizes.
// Term supports and a random rule base (64 pointer entries, up to 256 rules)
// are loaded through the load ports; for each random input vector the rule
// detection unit finds the active rules, which are compared with a
// reference. The testbench then plays the theta unit, which is not part of
// the design: each active rule gets a degree and an output value, the sums
// for two outputs are formed and handed to the defuzzifier, and the two crisp
// outputs are compared with the reference division. The next inference is
// started as soon as acquisition is free, so acquisition overlaps the rule
// walk before it and defuzzification overlaps the next walk.
// It counts how often each mechanism happened (empty pointer entries skipped,
// partially used premise words, pointer search overlapping rule selection,
// don't-care antecedents, active rules using all eight inputs, both
// defuzzifier outputs, a zero sum of degrees,
// a saturated quotient, the two halves busy together, acquisition during a
// walk) and fails if one never did.
module tb_cfuzzy_processor;
  import cfl_pkg::*;
  import cfl_ref_pkg::*;
  localparam int NG = 2**PTR_AW;

  logic clk = 0, rst_n = 0;
  logic start = 0, acq_ready, busy, done;
  logic [N_IN-1:0][X_W-1:0] x = '0;
  logic [N_RULES-1:0] rules;
  logic id1_cfg_we = 0, id2_cfg_we = 0;
  logic [$clog2(SHIFT_W)-1:0] id_cfg_addr = '0;
  support_t id_cfg_data = '0;
  logic pm_we = 0, ptr_we = 0;
  logic [PM_AW-1:0] pm_waddr = '0;
  logic [PM_DW-1:0] pm_wdata = '0;
  logic [PTR_AW-1:0] ptr_waddr = '0;
  ptr_entry_t ptr_wdata = '0;
  logic dfz_data_ready = 0, dfz_busy, dfz_done, xd_valid, xd_ch;
  logic [1:0][NUM_W-1:0] sum_thx = '0;
  logic [1:0][DEN_W-1:0] sum_th = '0;
  logic [Q_W-1:0] xd_now;
  logic [1:0][Q_W-1:0] xd;

  support_t sup [N_IN][N_TERMS];
  logic [PREM_W-1:0] prem [$];
  int checks = 0, failures = 0, words = 0;
  int n_skip = 0, n_partial = 0, n_overlap = 0, n_dontcare = 0, n_active = 0, n_inactive = 0;
  int n_ch [2] = '{0, 0}, n_zero = 0, n_sat = 0, n_both_busy = 0, n_acq_walk = 0, n_full = 0;
  int exp_xd [2];
  bit dfz_pending = 0;

  cfuzzy_processor dut (
    .clk, .rst_n,
    .rdu_start (start), .x, .rdu_acq_ready (acq_ready), .rdu_busy (busy), .rdu_done (done), .rules,
    .id1_cfg_we, .id2_cfg_we, .id_cfg_addr, .id_cfg_data,
    .pm_we, .pm_waddr, .pm_wdata, .ptr_we, .ptr_waddr, .ptr_wdata,
    .dfz_data_ready, .sum_thx, .sum_th, .dfz_busy, .dfz_done, .xd_now, .xd_valid, .xd_ch, .xd
  );
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, observed at the unit boundaries inside the top.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_rdu.u_cu.ptr_inflight && dut.u_rdu.u_cu.walking
        && dut.u_rdu.u_cu.ptr_rdata.count == 0) n_skip++;
    if (dut.u_rdu.rr_we && dut.u_rdu.rr_mask != '1) n_partial++;
    if (dut.u_rdu.ptr_re && dut.u_rdu.pm_re) n_overlap++;
    if (busy && dfz_busy) n_both_busy++;
    if (dut.u_rdu.a_valid && dut.u_rdu.u_cu.walking) n_acq_walk++;
    if (xd_valid) n_ch[xd_ch]++;
  end

  // Check each defuzzifier result as it completes.
  always @(negedge clk) if (dfz_done) begin
    checks++;
    if (int'(xd[0]) != exp_xd[0] || int'(xd[1]) != exp_xd[1]) begin
      failures++;
      $display("FAIL xd=%0d,%0d exp %0d,%0d", xd[0], xd[1], exp_xd[0], exp_xd[1]);
    end
    dfz_pending = 0;
  end

  task automatic load_supports();
    for (int v = 0; v < N_IN; v++)
      for (int t = 0; t < N_TERMS; t++) begin
        // terms spread over the universe with overlapping supports
        int c = t * 42 + $urandom_range(0, 20), w = (v == 0) ? $urandom_range(10, 60) : $urandom_range(100, 200);
        sup[v][t].lo = X_W'(c - w < 0 ? 0 : c - w);
        sup[v][t].hi = X_W'(c + w > 255 ? 255 : c + w);
        @(negedge clk);
        id1_cfg_we = (v < ID_VARS); id2_cfg_we = (v >= ID_VARS);
        id_cfg_addr = ($clog2(SHIFT_W))'((v % ID_VARS) * N_TERMS + t);
        id_cfg_data = sup[v][t];
      end
    @(negedge clk); id1_cfg_we = 0; id2_cfg_we = 0;
  endtask

  task automatic load_rules(int zero_pct);
    int total = 0, addr = 0;
    prem = {}; words = 0;
    for (int g = 0; g < NG; g++) begin
      int c = ($urandom_range(0, 99) < zero_pct) ? 0 : $urandom_range(1, 31);
      if (total + c > N_RULES) c = 0;
      addr += $urandom_range(0, 3);
      @(negedge clk);
      ptr_we = 1; ptr_waddr = PTR_AW'(g);
      ptr_wdata = '{count: CNT_W'(c), first: PM_AW'(addr)};
      for (int w = 0; w < (c + 3) / 4; w++) begin
        logic [PM_DW-1:0] word;
        for (int j = 0; j < N_EU; j++) begin
          word[j*PREM_W +: PREM_W] = rand_premise(j == 0 ? 0 : 50);
          if (4 * w + j < c) prem.push_back(word[j*PREM_W +: PREM_W]);
        end
        @(negedge clk); ptr_we = 0;
        pm_we = 1; pm_waddr = PM_AW'(addr); pm_wdata = word;
        addr++; words++;
      end
      total += c;
      @(negedge clk); pm_we = 0; ptr_we = 0;
    end
  endtask

  // Theta-unit stand-in: rule i has degree 1 + (i*37 mod 200) and output
  // value (i*91 mod 256); even rules feed output 0, odd rules output 1.
  task automatic seen(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL never happened: %s", what); end
  endtask

  task automatic defuzz(longint thx0, longint th0, longint thx1, longint th1);
    wait (!dfz_pending && !dfz_busy);
    @(negedge clk);
    sum_thx[0] = NUM_W'(thx0); sum_th[0] = DEN_W'(th0);
    sum_thx[1] = NUM_W'(thx1); sum_th[1] = DEN_W'(th1);
    exp_xd[0] = ref_div(thx0, th0); exp_xd[1] = ref_div(thx1, th1);
    if (th0 == 0 || th1 == 0) n_zero++;
    if ((th0 != 0 && thx0 / th0 > 255) || (th1 != 0 && thx1 / th1 > 255)) n_sat++;
    dfz_pending = 1;
    dfz_data_ready = 1;
    @(negedge clk); dfz_data_ready = 0;
  endtask

  typedef struct {
    logic [N_RULES-1:0] rules;
    longint thx [2];
    longint th [2];
  } expect_t;

  // Expected rule vector and theta-unit sums for inputs xv.
  function automatic expect_t expect_for(logic [N_IN-1:0][X_W-1:0] xv);
    logic [INT_W-1:0] m;
    expect_t e;
    e.rules = '0; e.thx = '{0, 0}; e.th = '{0, 0};
    for (int v = 0; v < N_IN; v++)
      for (int t = 0; t < N_TERMS; t++)
        m[v*N_TERMS + t] = ref_hit(int'(xv[v]), int'(sup[v][t].lo), int'(sup[v][t].hi));
    foreach (prem[i]) begin
      e.rules[i] = ref_rule(m, prem[i]);
      if (e.rules[i]) begin
        e.th[i % 2]  += 1 + (i * 37) % 200;
        e.thx[i % 2] += longint'(1 + (i * 37) % 200) * ((i * 91) % 256);
      end
    end
    return e;
  endfunction

  // n inferences back to back (acquisition of one overlapping the rule walk
  // of the one before); at each done the rules are checked and their sums go
  // to the defuzzifier, which then runs alongside the next walk.
  task automatic infer_batch(int n);
    expect_t expq [$];
    fork
      fork
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        while (!acq_ready) @(negedge clk);
        for (int v = 0; v < N_IN; v++) x[v] = X_W'($urandom);
        expq.push_back(expect_for(x));
        start = 1;
        @(negedge clk); start = 0;
      end
      for (int i = 0; i < n; i++) begin
        expect_t e;
        @(negedge clk);
        while (!done) @(negedge clk);
        e = expq.pop_front();
        checks++;
        if (rules !== e.rules) begin
          failures++;
          $display("FAIL rules (%0d listed)\n got %h\n exp %h", prem.size(), rules, e.rules);
        end
        foreach (prem[j]) if (rules[j]) begin
          bit dc;
          dc = 0;
          n_active++;
          for (int v = 0; v < N_IN; v++) if (prem[j][v*CODE_W +: CODE_W] == 0) dc = 1;
          if (dc) n_dontcare++; else n_full++;
        end else n_inactive++;
        defuzz(e.thx[0], e.th[0], e.thx[1], e.th[1]);
      end
      join
    join
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      load_supports();
      load_rules(r % 2 == 0 ? 30 : 80);
      infer_batch(10);
    end
    // Sums the stand-in never produces: nothing active, and an oversized quotient.
    defuzz(0, 0, 1000, 3);
    wait (!dfz_pending); @(negedge clk);
    $display("skipped=%0d partial=%0d overlap=%0d dontcare=%0d active=%0d inactive=%0d ch0=%0d ch1=%0d zero=%0d sat=%0d both_busy=%0d acq_walk=%0d full=%0d",
             n_skip, n_partial, n_overlap, n_dontcare, n_active, n_inactive, n_ch[0], n_ch[1], n_zero, n_sat, n_both_busy, n_acq_walk, n_full);
    seen("empty pointer entry skipped", n_skip);
    seen("partially used premise word", n_partial);
    seen("pointer search overlapping rule selection", n_overlap);
    seen("active rule with a don't-care antecedent", n_dontcare);
    seen("active rule", n_active);
    seen("active rule using all eight inputs", n_full);
    seen("inactive rule", n_inactive);
    seen("defuzzifier output 0", n_ch[0]);
    seen("defuzzifier output 1", n_ch[1]);
    seen("zero sum of degrees", n_zero);
    seen("saturated quotient", n_sat);
    seen("rule detection and defuzzification overlapping", n_both_busy);
    seen("input acquisition overlapping a rule walk", n_acq_walk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
