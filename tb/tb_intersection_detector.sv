// tb_intersection_detector: loads random term supports (some empty), applies
// random inputs, collects the 28 serial bits and compares each with the
// support test; also checks that exactly 28 bits come, starting the clock
// after start, and that the reset table (all supports empty) gives zeros.
module tb_intersection_detector;
  import cfl_pkg::*;
  import cfl_ref_pkg::*;
  localparam int NB = ID_VARS * N_TERMS;

  logic clk = 0, rst_n = 0, cfg_we = 0, start = 0;
  logic [$clog2(NB)-1:0] cfg_addr = '0;
  support_t cfg_data = '0;
  logic [ID_VARS-1:0][X_W-1:0] x = '0;
  logic bit_out, bit_valid;
  support_t sup [NB];
  int checks = 0, failures = 0;

  intersection_detector dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit after_reset);
    int nbits = 0, first = -1, cyc = 0;
    @(negedge clk);
    for (int v = 0; v < ID_VARS; v++) x[v] = X_W'($urandom);
    start = 1;
    @(negedge clk); start = 0;
    for (cyc = 1; cyc <= NB + 4; cyc++) begin
      if (bit_valid) begin
        int v = nbits / N_TERMS;
        bit exp = after_reset ? 1'b0 : ref_hit(int'(x[v]), int'(sup[nbits].lo), int'(sup[nbits].hi));
        if (first < 0) first = cyc;
        checks++;
        if (bit_out !== exp) begin
          failures++;
          $display("FAIL bit %0d x=%0d lo=%0d hi=%0d got %0b", nbits, x[v], sup[nbits].lo, sup[nbits].hi, bit_out);
        end
        nbits++;
      end
      @(negedge clk);
    end
    checks++;
    if (nbits != NB || first != 1) begin
      failures++;
      $display("FAIL timing: %0d bits, first in clock %0d", nbits, first);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1);
    for (int n = 0; n < 100; n++) begin
      for (int i = 0; i < NB; i++) begin
        int a, b;
        a = $urandom_range(0, 255);
        b = $urandom_range(0, 255);
        @(negedge clk);
        cfg_we = 1; cfg_addr = ($clog2(NB))'(i);
        if ($urandom_range(0, 9) == 0) cfg_data = '{lo: X_W'(a > b ? a : b), hi: X_W'(a > b ? b : a)};
        else                          cfg_data = '{lo: X_W'(a < b ? a : b), hi: X_W'(a < b ? b : a)};
        sup[i] = cfg_data;
      end
      @(negedge clk); cfg_we = 0;
      run(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
