// tb_defuzzifier: random sum pairs for the two outputs, including a zero sum
// of degrees and an oversized quotient; checks xd[0], xd[1] and the
// per-output xd_now/xd_valid/xd_ch stream against the reference division, and
// the total time from data_ready to done.
module tb_defuzzifier;
  import cfl_pkg::*;
  import cfl_ref_pkg::*;
  logic clk = 0, rst_n = 0, data_ready = 0;
  logic [1:0][NUM_W-1:0] sum_thx = '0;
  logic [1:0][DEN_W-1:0] sum_th = '0;
  logic busy, done, xd_valid;
  logic [Q_W-1:0] xd_now;
  logic [0:0] xd_ch;
  logic [1:0][Q_W-1:0] xd;
  int checks = 0, failures = 0;

  defuzzifier dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp [2], seen, cyc;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      for (int k = 0; k < 2; k++) begin
        int d;
        longint v;
        d = (n % 50 == k) ? 0 : $urandom_range(1, 16383);
        v = (n % 37 == k) ? 64'd4000000 : longint'(d) * longint'($urandom_range(0, 255)) + ((d > 0) ? longint'($urandom_range(0, d - 1)) : 64'd0);
        sum_th[k] = DEN_W'(d); sum_thx[k] = NUM_W'(v);
        exp[k] = ref_div(v, longint'(d));
      end
      @(negedge clk); data_ready = 1;
      @(negedge clk); data_ready = 0;
      sum_thx = '0; sum_th = '0;          // registers must hold the sampled sums
      seen = 0; cyc = 1;
      while (!done && cyc < 100) begin
        if (xd_valid) begin
          checks++;
          if (int'(xd_ch) != seen || int'(xd_now) != exp[seen]) begin
            failures++;
            $display("FAIL stream ch=%0d now=%0d exp %0d", xd_ch, xd_now, exp[seen]);
          end
          seen++;
        end
        @(negedge clk); cyc++;
      end
      checks++;
      if (seen != 2 || int'(xd[0]) != exp[0] || int'(xd[1]) != exp[1]) begin
        failures++;
        $display("FAIL n=%0d xd=%0d,%0d exp %0d,%0d", n, xd[0], xd[1], exp[0], exp[1]);
      end
      checks++;
      if (cyc > 2 * (Q_W + 3) + 2) begin failures++; $display("FAIL took %0d clocks", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
