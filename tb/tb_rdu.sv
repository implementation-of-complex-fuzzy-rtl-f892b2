// tb_rdu: the whole rule detection unit. Loads random term supports into
// both intersection detectors and a random rule base (pointer table and
// premise words, with random filler in unused lanes) through the load ports,
// applies random crisp inputs and compares the 256-bit active-rule vector
// with a reference computed from the supports and premises. Also checks that
// rules past the last listed rule stay 0 and that each inference ends with
// done within a bound on its clock count. Inferences are started back to
// back, each as soon as acquisition is free, so acquisition overlaps the
// previous rule walk.
module tb_rdu;
  import cfl_pkg::*;
  import cfl_ref_pkg::*;
  localparam int NG = 2**PTR_AW;

  logic clk = 0, rst_n = 0, start = 0, acq_ready, busy, done;
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

  support_t sup [N_IN][N_TERMS];
  logic [PREM_W-1:0] prem [$];     // premises in walk order
  int checks = 0, failures = 0, words = 0;

  rdu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  // Expected rule vector for inputs xv.
  function automatic logic [N_RULES-1:0] expect_rules(logic [N_IN-1:0][X_W-1:0] xv);
    logic [INT_W-1:0] m;
    logic [N_RULES-1:0] r = '0;
    for (int v = 0; v < N_IN; v++)
      for (int t = 0; t < N_TERMS; t++)
        m[v*N_TERMS + t] = ref_hit(int'(xv[v]), int'(sup[v][t].lo), int'(sup[v][t].hi));
    foreach (prem[i]) r[i] = ref_rule(m, prem[i]);
    return r;
  endfunction

  // n inferences back to back: each start is given as soon as acquisition is
  // free, so it overlaps the previous rule walk; results are checked at done.
  task automatic infer_batch(int n);
    logic [N_RULES-1:0] expq [$];
    int t0 [$];
    int cyc = 0;
    fork
      fork
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        while (!acq_ready) @(negedge clk);
        for (int v = 0; v < N_IN; v++) x[v] = X_W'($urandom);
        expq.push_back(expect_rules(x));
        t0.push_back(cyc);
        start = 1;
        @(negedge clk); start = 0;
      end
      for (int i = 0; i < n; i++) begin
        logic [N_RULES-1:0] e;
        int ts;
        @(negedge clk);
        while (!done) @(negedge clk);
        e = expq.pop_front();
        ts = t0.pop_front();
        checks++;
        if (rules !== e) begin
          failures++;
          $display("FAIL rules (%0d listed)\n got %h\n exp %h", prem.size(), rules, e);
        end
        // from start to done: acquisition (possibly waiting for the walk
        // before) plus this walk
        checks++;
        if (cyc - ts > 2 * (SHIFT_W + 1 + words + 2 * NG + 6)) begin
          failures++; $display("FAIL took %0d clocks", cyc - ts);
        end
      end
      join
      forever begin @(posedge clk); cyc++; end
    join_any
    disable fork;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int r = 0; r < 6; r++) begin
      load_supports();
      load_rules(r % 2 == 0 ? 30 : 80);
      infer_batch(20);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
