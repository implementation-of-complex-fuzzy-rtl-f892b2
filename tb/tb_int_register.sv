// tb_int_register: parallel load when load is high, hold otherwise, clear on reset.
module tb_int_register;
  localparam int W = cfl_pkg::INT_W;
  logic clk = 0, rst_n = 0, load = 0;
  logic [W-1:0] d = '0, q, expq;
  int checks = 0, failures = 0;

  int_register dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    expq = '0;
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      checks++; if (q !== expq) begin failures++; $display("FAIL q=%h exp %h", q, expq); end
      d = W'({$urandom, $urandom});
      load = ($urandom_range(0, 2) == 0);
      @(posedge clk); if (load) expq = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
