// premise_memory: the rule premises, four rules per word.
//
// Word w holds the antecedent codes of four rules, rule j of the word in bits
// [24j+23:24j] (8 codes of 3 bits each). The RD control unit reads it through
// an 11-bit address; a separate write port loads the rule base. The address
// width follows the architecture. The word is 96 bits wide so that one read
// feeds all four execution units in a clock; the synchronous read and the write
// port are this design's choices.
//
// Timing: rdata holds the word at raddr one clock after re.
module premise_memory #(
  parameter int unsigned AW = cfl_pkg::PM_AW,
  parameter int unsigned DW = cfl_pkg::PM_DW
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
