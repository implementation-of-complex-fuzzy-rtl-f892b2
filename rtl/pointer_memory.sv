// pointer_memory: where each rule group starts and how many rules it has.
//
// One 16-bit entry per rule group, addressed by a 6-bit group number. An entry
// is a cfl_pkg::ptr_entry_t: bits [10:0] are the premise-memory address of the
// group's first word, bits [15:11] the number of rules in the group (0..31).
// Address and data widths follow the architecture; the split of the 16 bits,
// the synchronous read and the write port are this design's choices.
//
// Timing: rdata holds the entry at raddr one clock after re.
module pointer_memory #(
  parameter int unsigned AW = cfl_pkg::PTR_AW,
  parameter int unsigned DW = cfl_pkg::PTR_DW
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
