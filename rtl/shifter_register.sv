// shifter_register: serial-in, parallel-out register for intersection bits.
//
// Each clock with shift_en high the register moves one place toward bit 0 and
// takes din into its top bit, so after W shifts the first bit received sits in
// bit 0 and the last in bit W-1. It collects the W = 28 bits one intersection
// detector sends for its 4 variables x 7 terms. The width follows the
// architecture; the shift direction is this design's choice.
//
// Timing: q changes on the clock edge after shift_en; reset clears it.
module shifter_register #(
  parameter int unsigned W = cfl_pkg::SHIFT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_en,
  input  logic         din,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (shift_en) q <= {din, q[W-1:1]};
  end

endmodule
