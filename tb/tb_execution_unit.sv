// tb_execution_unit: checks the rule-activity decision of one execution unit
// and its per-antecedent vector against a reference model, on directed
// cases and 2000 random ones.
module tb_execution_unit;
  import cfl_pkg::*;
  import cfl_ref_pkg::*;

  logic [INT_W-1:0]  m;
  logic [PREM_W-1:0] code;
  logic [N_IN-1:0]   ante;
  logic              active;
  int checks = 0, failures = 0;

  execution_unit dut (.int_bits (m), .code (code), .ante (ante), .active (active));

  task automatic check(string what);
    bit exp = ref_rule(m, code);
    checks++;
    if (active !== exp) begin
      failures++;
      $display("FAIL %s: m=%h code=%h got %0b exp %0b", what, m, code, active, exp);
    end
    // Each antecedent alone: the rule made of only that code.
    for (int i = 0; i < N_IN; i++) begin
      logic [PREM_W-1:0] one = '0;
      one[i*CODE_W +: CODE_W] = code[i*CODE_W +: CODE_W];
      checks++;
      if (ante[i] !== ref_rule(m, one)) begin
        failures++;
        $display("FAIL %s: antecedent %0d got %0b", what, i, ante[i]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // No antecedent used: always active.
    m = '0; code = '0; #1; check("all dont-care");
    // Each variable, each term, alone.
    for (int i = 0; i < N_IN; i++)
      for (int t = 1; t <= N_TERMS; t++) begin
        code = '0; code[i*CODE_W +: CODE_W] = CODE_W'(t);
        m = '0; #1; check("single miss");
        m[i*N_TERMS + t - 1] = 1'b1; #1; check("single hit");
        m = ~m; #1; check("single inverted");
      end
    // Random, with intersection vectors dense enough that rules fire.
    for (int n = 0; n < 2000; n++) begin
      for (int b = 0; b < INT_W; b++) m[b] = ($urandom_range(0, 3) != 0);
      code = rand_premise();
      #1; check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
