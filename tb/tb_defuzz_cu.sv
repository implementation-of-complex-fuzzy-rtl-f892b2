// tb_defuzz_cu: with a divider stand-in of random latency, checks that after
// data_ready the unit starts the divider once per output in order 0, 1, holds
// sel during each division, captures each result when the divider finishes,
// ends with one all_done pulse, and ignores data_ready while busy.
module tb_defuzz_cu;
  logic clk = 0, rst_n = 0, data_ready = 0, div_done = 0;
  logic busy, div_start, cap, all_done;
  logic [0:0] sel;
  int checks = 0, failures = 0;

  defuzz_cu dut (.*);
  always #5 clk = ~clk;

  // Divider stand-in: done after 1..12 clocks.
  initial forever begin
    @(posedge clk);
    if (div_start) begin
      repeat ($urandom_range(0, 11)) @(posedge clk);
      div_done <= 1'b1;
      @(posedge clk);
      div_done <= 1'b0;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int starts, caps, dones, cyc;
    int start_sel [$], cap_sel [$];
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      starts = 0; caps = 0; dones = 0; start_sel = {}; cap_sel = {};
      @(negedge clk); data_ready = 1;
      @(negedge clk); data_ready = 0;
      cyc = 0;
      while (dones == 0 && cyc < 100) begin
        if (cyc == 3) data_ready = 1;     // must be ignored
        if (cyc == 4) data_ready = 0;
        if (div_start) begin starts++; start_sel.push_back(int'(sel)); end
        if (cap)       begin caps++;   cap_sel.push_back(int'(sel)); end
        if (all_done)  dones++;
        @(negedge clk); cyc++;
      end
      checks++;
      if (starts != 2 || caps != 2 || dones != 1 || start_sel[0] != 0 || start_sel[1] != 1
          || cap_sel[0] != 0 || cap_sel[1] != 1) begin
        failures++;
        $display("FAIL starts=%0d caps=%0d dones=%0d", starts, caps, dones);
      end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
