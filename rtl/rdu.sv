// rdu: rule detection unit - finds the rules an input vector activates.
//
// Two intersection detectors (4 input variables each) stream, one bit per
// clock, which fuzzy terms each crisp input falls into; two 28-bit shifter
// registers collect the bits and the 56-bit intersection register takes them
// over in one clock (detector 1 -> M1..M4, detector 2 -> M5..M8). The RD control
// unit then walks the pointer memory, reads the premise words of each rule
// group, and the active-rule selector (four execution units) evaluates four
// rules per clock against the intersection register. The four rule states are
// stored in the 256-bit rule register at the rule number given by the control
// unit; that register is what the theta unit (rule-degree computation, not
// part of this design) receives.
//
// The rule base is loaded through the premise (pm_*) and pointer (ptr_*) write
// ports, the term supports through the id*_cfg_* ports. The block structure
// and all bus widths follow the architecture; the 96-bit premise word, the
// loading ports and the handshake are this design's choices.
//
// Timing: start pulse (taken while acq_ready is high); 28 clocks of
// acquisition, one clock to load the intersection register, then about one
// clock per premise word plus a few per group; done pulses when rules is final
// and rules holds until the next inference loads the intersection register,
// at the earliest one clock after done. With no groups (all counts zero) the
// walk takes 2*N_GROUPS clocks. The next start is accepted as soon as the
// intersection register is loaded, so its acquisition overlaps this walk.
module rdu
  import cfl_pkg::*;
#(
  parameter int unsigned N_GROUPS = 2**PTR_AW
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // inference control
  input  logic                         start,
  input  logic [N_IN-1:0][X_W-1:0]     x,
  output logic                         acq_ready,
  output logic                         busy,
  output logic                         done,
  output logic [N_RULES-1:0]           rules,
  // term supports: detector 1 serves x[0..3], detector 2 x[4..7]
  input  logic                         id1_cfg_we,
  input  logic                         id2_cfg_we,
  input  logic [$clog2(SHIFT_W)-1:0]   id_cfg_addr,
  input  support_t                     id_cfg_data,
  // rule base load
  input  logic                         pm_we,
  input  logic [PM_AW-1:0]             pm_waddr,
  input  logic [PM_DW-1:0]             pm_wdata,
  input  logic                         ptr_we,
  input  logic [PTR_AW-1:0]            ptr_waddr,
  input  ptr_entry_t                   ptr_wdata
);

  logic                id_start;
  logic                a_bit, a_valid, b_bit, b_valid;
  logic [SHIFT_W-1:0]  sh_a, sh_b;
  logic                int_load;
  logic [INT_W-1:0]    int_q;
  logic                ptr_re, pm_re;
  logic [PTR_AW-1:0]   ptr_raddr;
  logic [PTR_DW-1:0]   ptr_rdata;
  logic [PM_AW-1:0]    pm_raddr;
  logic [PM_DW-1:0]    pm_rdata;
  logic                rr_clear, rr_we;
  logic [RIDX_W-1:0]   rr_idx;
  logic [N_EU-1:0]     rr_mask, rule_state;

  intersection_detector u_id1 (
    .clk, .rst_n,
    .cfg_we (id1_cfg_we), .cfg_addr (id_cfg_addr), .cfg_data (id_cfg_data),
    .start (id_start), .x (x[ID_VARS-1:0]),
    .bit_out (a_bit), .bit_valid (a_valid)
  );

  intersection_detector u_id2 (
    .clk, .rst_n,
    .cfg_we (id2_cfg_we), .cfg_addr (id_cfg_addr), .cfg_data (id_cfg_data),
    .start (id_start), .x (x[N_IN-1:ID_VARS]),
    .bit_out (b_bit), .bit_valid (b_valid)
  );

  shifter_register u_sh_a (.clk, .rst_n, .shift_en (a_valid), .din (a_bit), .q (sh_a));
  shifter_register u_sh_b (.clk, .rst_n, .shift_en (b_valid), .din (b_bit), .q (sh_b));

  int_register u_int (.clk, .rst_n, .load (int_load), .d ({sh_b, sh_a}), .q (int_q));

  rd_cu #(.N_GROUPS (N_GROUPS)) u_cu (
    .clk, .rst_n, .start, .acq_ready, .busy, .done,
    .id_start, .int_load,
    .ptr_re, .ptr_raddr, .ptr_rdata (ptr_entry_t'(ptr_rdata)),
    .pm_re, .pm_raddr,
    .rr_clear, .rr_we, .rr_idx, .rr_mask
  );

  pointer_memory u_ptr (
    .clk, .we (ptr_we), .waddr (ptr_waddr), .wdata (ptr_wdata),
    .re (ptr_re), .raddr (ptr_raddr), .rdata (ptr_rdata)
  );

  premise_memory u_pm (
    .clk, .we (pm_we), .waddr (pm_waddr), .wdata (pm_wdata),
    .re (pm_re), .raddr (pm_raddr), .rdata (pm_rdata)
  );

  act_rule_selector u_ars (.int_bits (int_q), .codes (pm_rdata), .rule_state (rule_state));

  rule_reg u_rr (
    .clk, .rst_n, .clear (rr_clear), .we (rr_we), .idx (rr_idx),
    .state (rule_state), .mask (rr_mask), .q (rules)
  );

endmodule
