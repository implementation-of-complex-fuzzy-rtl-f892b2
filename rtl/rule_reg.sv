// rule_reg: one activity bit per rule, handed to the theta unit.
//
// The four execution units produce N_EU rule states per clock. The RD control
// unit gives the number of the first of these rules (idx) and a lane mask;
// bit j of state is stored at position idx+j when mask[j] is set (positions
// wrap modulo N_RULES). clear zeroes the whole register at the start of an
// inference. The 256-bit register, the 4-bit state input and the 8-bit index
// follow the architecture; the mask and clear are this design's choices.
//
// Timing: writes take effect on the clock edge; clear has priority.
module rule_reg #(
  parameter int unsigned N_RULES = cfl_pkg::N_RULES,
  parameter int unsigned N_EU    = cfl_pkg::N_EU
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       we,
  input  logic [$clog2(N_RULES)-1:0] idx,
  input  logic [N_EU-1:0]            state,
  input  logic [N_EU-1:0]            mask,
  output logic [N_RULES-1:0]         q
);

  localparam int unsigned IW = $clog2(N_RULES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (clear) begin
      q <= '0;
    end else if (we) begin
      for (int j = 0; j < N_EU; j++)
        if (mask[j]) q[IW'(idx + IW'(j))] <= state[j];
    end
  end

endmodule
