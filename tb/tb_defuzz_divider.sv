// tb_defuzz_divider: random and corner-case divisions against
// floor(num/den) with saturation at 255 and 0 for a zero divisor; checks that
// done comes Q_W = 8 clocks after the start clock for a normal division.
module tb_defuzz_divider;
  import cfl_pkg::*;
  import cfl_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [NUM_W-1:0] num = '0;
  logic [DEN_W-1:0] den = '0;
  logic [Q_W-1:0]   q;
  int checks = 0, failures = 0;

  defuzz_divider dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic div(longint n, longint d);
    int lat = 0, exp = ref_div(n, d);
    @(negedge clk);
    num = NUM_W'(n); den = DEN_W'(d); start = 1;
    @(negedge clk); start = 0;
    do begin lat++; @(negedge clk); end while (!done && lat < 50);
    checks++;
    if (q !== Q_W'(exp)) begin failures++; $display("FAIL %0d/%0d got %0d exp %0d", n, d, q, exp); end
    if (d != 0 && n / d < 256) begin
      checks++;
      if (lat != Q_W) begin failures++; $display("FAIL latency %0d", lat); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    div(0, 1); div(255, 1); div(256, 1); div(100, 0); div(4194303, 16383);
    div(16383 * 255, 16383); div(16383 * 256, 16383); div(1000, 7); div(13, 13);
    for (int i = 0; i < 3000; i++) begin
      longint d, n;
      d = longint'($urandom_range(1, 16383));
      n = (i % 4 == 0) ? longint'($urandom_range(0, 4194303)) : d * longint'($urandom_range(0, 255)) + longint'($urandom_range(0, int'(d) - 1));
      div(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
