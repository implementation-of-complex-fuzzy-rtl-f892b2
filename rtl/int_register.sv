// int_register: the intersection register M1..M8.
//
// Holds the W = 56 intersection bits (8 variables x 7 terms, field M_i in bits
// [7i+6:7i]) of one inference while the rules are evaluated, so the detectors
// and shifter registers are free to acquire the next inputs. It loads in
// parallel from the two shifter registers when load is high. Width and role
// follow the architecture; reset to zero is this design's choice.
//
// Timing: q holds the value of d from the edge at which load was high.
module int_register #(
  parameter int unsigned W = cfl_pkg::INT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
