// tb_act_rule_selector: four rules evaluated at once must each match the
// reference rule model, lane j reading premise bits [24j+23:24j].
module tb_act_rule_selector;
  import cfl_pkg::*;
  import cfl_ref_pkg::*;

  logic [INT_W-1:0] m;
  logic [PM_DW-1:0] codes;
  logic [N_EU-1:0]  st;
  int checks = 0, failures = 0;

  act_rule_selector dut (.int_bits (m), .codes (codes), .rule_state (st));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int b = 0; b < INT_W; b++) m[b] = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < N_EU; j++) codes[j*PREM_W +: PREM_W] = rand_premise();
      #1;
      for (int j = 0; j < N_EU; j++) begin
        checks++;
        if (st[j] !== ref_rule(m, codes[j*PREM_W +: PREM_W])) begin
          failures++;
          $display("FAIL lane %0d m=%h codes=%h st=%b", j, m, codes, st);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
