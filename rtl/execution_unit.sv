// execution_unit: decides whether one rule is active.
//
// The intersection register holds, for each of the N_IN input variables, a
// field M_i with one bit per fuzzy term that is set when the input's degree of
// membership in that term is above zero. A rule premise gives one CODE_W-bit
// code per variable. For each variable an 8-to-1 multiplexer picks the bit the
// code names, and an N_IN-input AND of the multiplexer outputs is the rule's
// active signal. This follows the multiplexer-and-AND8 structure of the
// architecture. Its own choice: code 0 means "variable not used by the rule"
// and selects a constant 1; code c (1..7) selects term bit c-1.
//
// Interface: int_bits (N_IN*N_TERMS), code (N_IN*CODE_W); ante (N_IN bits),
// the multiplexer outputs, bit i set when antecedent i has a non-zero degree
// of activation (or is not used); active, their AND.
// Timing: purely combinational.
module execution_unit #(
  parameter int unsigned N_IN    = cfl_pkg::N_IN,
  parameter int unsigned N_TERMS = cfl_pkg::N_TERMS,
  parameter int unsigned CODE_W  = cfl_pkg::CODE_W
) (
  input  logic [N_IN*N_TERMS-1:0] int_bits,
  input  logic [N_IN*CODE_W-1:0]  code,
  output logic [N_IN-1:0]         ante,
  output logic                    active
);

  for (genvar i = 0; i < N_IN; i++) begin : g_mux
    // Data inputs of the multiplexer: constant 1 then the term bits of M_i.
    logic [2**CODE_W-1:0] mux_in;
    assign mux_in = {{(2**CODE_W-1-N_TERMS){1'b0}}, int_bits[i*N_TERMS +: N_TERMS], 1'b1};
    assign ante[i] = mux_in[code[i*CODE_W +: CODE_W]];
  end

  assign active = &ante;

endmodule
