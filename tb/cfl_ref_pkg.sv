// cfl_ref_pkg: reference models used by the testbenches.
//
// Written from the behaviour the blocks are meant to have, independently of
// their RTL: membership-support test, rule evaluation (code 0 = variable not
// used, code c selects term c-1), and the defuzzifier's saturating division.
package cfl_ref_pkg;
  import cfl_pkg::*;

  // Is term t of a variable hit by x, given its support bounds?
  function automatic bit ref_hit(int x, int lo, int hi);
    return (x >= lo) && (x <= hi);
  endfunction

  // Rule activity from the 56 intersection bits and a 24-bit premise.
  function automatic bit ref_rule(logic [INT_W-1:0] m, logic [PREM_W-1:0] code);
    bit act = 1;
    for (int i = 0; i < N_IN; i++) begin
      int c = int'(code[i*CODE_W +: CODE_W]);
      if (c != 0 && m[i*N_TERMS + c - 1] == 1'b0) act = 0;
    end
    return act;
  endfunction

  // Crisp output: floor(num/den), 255 when too large, 0 for den = 0.
  function automatic int ref_div(longint num, longint den);
    if (den == 0) return 0;
    if (num / den > 255) return 255;
    return int'(num / den);
  endfunction

  // A random premise: each variable unused with probability unused_pct %,
  // else a random term.
  function automatic logic [PREM_W-1:0] rand_premise(int unused_pct = 50);
    logic [PREM_W-1:0] p;
    for (int i = 0; i < N_IN; i++)
      p[i*CODE_W +: CODE_W] = ($urandom_range(0, 99) < unused_pct) ? 3'd0 : CODE_W'($urandom_range(1, N_TERMS));
    return p;
  endfunction
endpackage
