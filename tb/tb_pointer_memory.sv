// tb_pointer_memory: writes random words to random addresses and reads them back,
// checking the one-clock read latency and that rdata holds while re is low.
module tb_pointer_memory;
  import cfl_pkg::*;
  logic clk = 0, we = 0, re = 0;
  logic [PTR_AW-1:0] waddr = '0, raddr = '0;
  logic [PTR_DW-1:0] wdata = '0, rdata, held;
  logic [PTR_DW-1:0] model [int];
  int checks = 0, failures = 0;

  pointer_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1; waddr = PTR_AW'($urandom); wdata = PTR_DW'({$urandom, $urandom, $urandom});
      model[int'(waddr)] = wdata;
      @(negedge clk); we = 0;
      if (n % 3 == 0) begin
        // read back a random address already written
        int a;
        void'(model.first(a));
        repeat ($urandom_range(0, 20)) void'(model.next(a));
        re = 1; raddr = PTR_AW'(a);
        @(negedge clk); re = 0;
        checks++;
        if (rdata !== model[a]) begin failures++; $display("FAIL a=%0d got %h exp %h", a, rdata, model[a]); end
        held = rdata; raddr = ~raddr;
        @(negedge clk);
        checks++;
        if (rdata !== held) begin failures++; $display("FAIL hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
