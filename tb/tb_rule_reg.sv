// tb_rule_reg: random masked four-bit writes at random rule numbers (including
// wrap-around past rule 255) and clears, compared with a bit-array model.
module tb_rule_reg;
  import cfl_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, we = 0;
  logic [RIDX_W-1:0]  idx = '0;
  logic [N_EU-1:0]    state = '0, mask = '0;
  logic [N_RULES-1:0] q, model;
  int checks = 0, failures = 0;

  rule_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++; if (q !== model) begin failures++; $display("FAIL n=%0d", n); end
      clear = ($urandom_range(0, 200) == 0);
      we    = ($urandom_range(0, 3) != 0);
      idx   = RIDX_W'($urandom);
      state = N_EU'($urandom);
      mask  = N_EU'($urandom);
      @(posedge clk);
      if (clear) model = '0;
      else if (we)
        for (int j = 0; j < N_EU; j++) if (mask[j]) model[(int'(idx) + j) % N_RULES] = state[j];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
