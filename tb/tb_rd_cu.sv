// tb_rd_cu: the RD control unit against a pointer table held in the
// testbench (one-clock read latency, as the pointer memory). For random
// tables (empty groups, partial last words, rule groups up to 31 rules) it
// checks the acquisition timing (id_start, then int_load and rr_clear 29
// clocks later), the exact sequence of premise addresses, the rule number
// and lane mask of every rule-register write, the done pulse, an upper bound
// on the walk time, that pointer reads overlap premise reads, and that a
// new inference is acquired during a walk and loaded right after its done.
module tb_rd_cu;
  import cfl_pkg::*;
  localparam int NG = 2**PTR_AW;

  logic clk = 0, rst_n = 0, start = 0;
  logic acq_ready, busy, done, id_start, int_load, ptr_re, pm_re, rr_clear, rr_we;
  logic [PTR_AW-1:0] ptr_raddr;
  ptr_entry_t        ptr_rdata;
  logic [PM_AW-1:0]  pm_raddr;
  logic [RIDX_W-1:0] rr_idx;
  logic [N_EU-1:0]   rr_mask;
  ptr_entry_t tbl [NG];
  int checks = 0, failures = 0, overlaps = 0;

  rd_cu dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (ptr_re) ptr_rdata <= tbl[ptr_raddr];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int zero_pct);
    int exp_addr [$], exp_idx [$], exp_mask [$], got_addr [$], got_idx [$], got_mask [$];
    int total = 0, words = 0, nonempty = 0, cyc = 0, t_id = -1, t_load = -1, t_clear = -1;
    // random table with at most 256 rules
    for (int g = 0; g < NG; g++) begin
      int c = ($urandom_range(0, 99) < zero_pct) ? 0 : $urandom_range(1, 31);
      if (total + c > N_RULES) c = 0;
      tbl[g].count = CNT_W'(c);
      tbl[g].first = PM_AW'($urandom);
      for (int w = 0; w < (c + 3) / 4; w++) begin
        int l = (c - 4 * w > 4) ? 4 : c - 4 * w;
        exp_addr.push_back((int'(tbl[g].first) + w) % (2**PM_AW));
        exp_idx.push_back(total + 4 * w);
        exp_mask.push_back((1 << l) - 1);
      end
      if (c > 0) nonempty++;
      words += (c + 3) / 4;
      total += c;
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done && cyc < 5000) begin
      cyc++;
      if (id_start) t_id = cyc;
      if (int_load) t_load = cyc;
      if (rr_clear) t_clear = cyc;
      if (pm_re) got_addr.push_back(int'(pm_raddr));
      if (rr_we) begin got_idx.push_back(int'(rr_idx)); got_mask.push_back(int'(rr_mask)); end
      if (pm_re && ptr_re) overlaps++;
      @(negedge clk);
    end
    checks++;
    if (!done) begin failures++; $display("FAIL no done"); end
    checks++;
    if (t_id != -1 || t_load != ACQ_CYCLES_T + 1 || t_clear != t_load) begin
      failures++; $display("FAIL acquisition timing id=%0d load=%0d clear=%0d", t_id, t_load, t_clear);
    end
    checks++;
    if (got_addr != exp_addr || got_idx != exp_idx || got_mask != exp_mask) begin
      failures++;
      $display("FAIL sequence: %0d/%0d words", got_addr.size(), exp_addr.size());
      for (int i = 0; i < exp_addr.size() && i < got_addr.size() && i < got_idx.size(); i++)
        if (got_addr[i] != exp_addr[i] || got_idx[i] != exp_idx[i] || got_mask[i] != exp_mask[i])
          $display("  word %0d: addr %0d/%0d idx %0d/%0d mask %0h/%0h", i, got_addr[i], exp_addr[i], got_idx[i], exp_idx[i], got_mask[i], exp_mask[i]);
    end
    // walk: at most one clock per word, two per pointer entry, plus the drain
    checks++;
    if (cyc > ACQ_CYCLES_T + 1 + words + 2 * NG + 4) begin
      failures++; $display("FAIL walk too slow: %0d clocks for %0d words", cyc, words);
    end
  endtask

  localparam int ACQ_CYCLES_T = SHIFT_W;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // id_start is combinational with start: check it in the start clock
    @(negedge clk); start = 1; #1;
    checks++; if (!id_start) begin failures++; $display("FAIL id_start"); end
    @(negedge clk); start = 0;
    wait (done); @(negedge clk);
    for (int n = 0; n < 60; n++) run(n % 3 == 0 ? 90 : 40);
    // Pipelining: a second start while the first walk runs is acquired at
    // once and loaded in the clock after the first done.
    for (int n = 0; n < 10; n++) begin
      int cyc, t_id2, t_done, t_load2;
      cyc = 0; t_id2 = -1; t_done = -1; t_load2 = -1;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!int_load) @(negedge clk);
      @(negedge clk);
      checks++;
      if (!acq_ready) begin failures++; $display("FAIL acquisition not free after load"); end
      start = 1; #1;
      if (id_start) t_id2 = 0;
      @(negedge clk); start = 0;
      while (t_load2 < 0 && cyc < 5000) begin
        cyc++;
        if (done) t_done = cyc;
        if (int_load) t_load2 = cyc;
        @(negedge clk);
      end
      checks++;
      if (t_id2 != 0 || t_done < 0 || t_load2 != t_done + 1) begin
        failures++; $display("FAIL pipelined start: id=%0d done=%0d load=%0d", t_id2, t_done, t_load2);
      end
      while (!done) @(negedge clk);
      @(negedge clk);
    end
    checks++;
    if (overlaps == 0) begin failures++; $display("FAIL pointer search never overlapped rule selection"); end
    $display("overlapped pointer/premise reads: %0d", overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
