// act_rule_selector: evaluates N_EU rules in the same clock.
//
// N_EU execution units share the intersection register contents and each
// receives its own rule premise (N_IN*CODE_W bits) from the premise code bus;
// unit j reads bits [j*N_IN*CODE_W +: N_IN*CODE_W]. Their active outputs form
// rule_state, bit j for unit j. Four units and the 96-bit code bus follow the
// architecture; the bit order on the bus is this design's choice.
//
// Timing: combinational.
module act_rule_selector #(
  parameter int unsigned N_EU    = cfl_pkg::N_EU,
  parameter int unsigned N_IN    = cfl_pkg::N_IN,
  parameter int unsigned N_TERMS = cfl_pkg::N_TERMS,
  parameter int unsigned CODE_W  = cfl_pkg::CODE_W
) (
  input  logic [N_IN*N_TERMS-1:0]     int_bits,
  input  logic [N_EU*N_IN*CODE_W-1:0] codes,
  output logic [N_EU-1:0]             rule_state
);

  localparam int unsigned PW = N_IN * CODE_W;

  for (genvar j = 0; j < N_EU; j++) begin : g_eu
    execution_unit #(.N_IN(N_IN), .N_TERMS(N_TERMS), .CODE_W(CODE_W)) u_eu (
      .int_bits (int_bits),
      .code     (codes[j*PW +: PW]),
      .ante     (),
      .active   (rule_state[j])
    );
  end

endmodule
