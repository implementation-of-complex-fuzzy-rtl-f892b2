// tb_shifter_register: shifts random 28-bit words in serially and checks that
// the first bit lands in bit 0; also checks that the register holds when
// shift_en is low and clears on reset.
module tb_shifter_register;
  localparam int W = cfl_pkg::SHIFT_W;
  logic clk = 0, rst_n = 0, shift_en = 0, din = 0;
  logic [W-1:0] q, word;
  int checks = 0, failures = 0;

  shifter_register dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++; if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      word = W'({$urandom, $urandom});
      for (int b = 0; b < W; b++) begin
        @(negedge clk); shift_en = 1; din = word[b];
      end
      @(negedge clk); shift_en = 0;
      checks++; if (q !== word) begin failures++; $display("FAIL q=%h exp %h", q, word); end
      @(negedge clk); din = ~din;
      @(negedge clk);
      checks++; if (q !== word) begin failures++; $display("FAIL hold q=%h", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
