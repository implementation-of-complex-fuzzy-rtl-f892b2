// cfl_pkg: sizes and types shared by the fuzzy-processor blocks.
//
// The rule detection side handles 8 input variables with up to 7 fuzzy terms
// each; an antecedent is a 3-bit term code, so one rule premise is 8 x 3 = 24
// bits and four execution units read 96 bits of premise codes per clock. The
// rule register keeps one bit for each of 256 rules. The defuzzifier divides a
// 22-bit weighted sum by a 14-bit sum of degrees into an 8-bit crisp value.
// These numbers are the ones of the architecture described; the 8-bit width of
// a crisp input and the pointer-entry layout are this design's choices.
package cfl_pkg;

  localparam int unsigned N_IN      = 8;   // input variables (M1..M8)
  localparam int unsigned N_TERMS   = 7;   // fuzzy terms per variable
  localparam int unsigned CODE_W    = 3;   // antecedent code width
  localparam int unsigned PREM_W    = N_IN * CODE_W;        // 24
  localparam int unsigned N_EU      = 4;   // execution units in parallel
  localparam int unsigned INT_W     = N_IN * N_TERMS;       // 56
  localparam int unsigned ID_VARS   = 4;   // variables per intersection detector
  localparam int unsigned SHIFT_W   = ID_VARS * N_TERMS;    // 28
  localparam int unsigned X_W       = 8;   // crisp input width
  localparam int unsigned PM_AW     = 11;  // premise memory address
  localparam int unsigned PM_DW     = N_EU * PREM_W;        // 96
  localparam int unsigned PTR_AW    = 6;   // pointer memory address
  localparam int unsigned CNT_W     = 5;   // rules per group field
  localparam int unsigned PTR_DW    = PM_AW + CNT_W;        // 16
  localparam int unsigned N_RULES   = 256; // RULE-REG width
  localparam int unsigned RIDX_W    = $clog2(N_RULES);      // 8
  localparam int unsigned NUM_W     = 22;  // sum theta*X
  localparam int unsigned DEN_W     = 14;  // sum theta
  localparam int unsigned Q_W       = 8;   // crisp output X_D

  // One pointer-memory entry: where a rule group starts and how many rules it has.
  typedef struct packed {
    logic [CNT_W-1:0] count;
    logic [PM_AW-1:0] first;
  } ptr_entry_t;

  // Support of one fuzzy term: the term's degree is above zero for lo <= x <= hi.
  typedef struct packed {
    logic [X_W-1:0] hi;
    logic [X_W-1:0] lo;
  } support_t;

endpackage
