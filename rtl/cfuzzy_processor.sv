// cfuzzy_processor: rule detection and defuzzification of a fuzzy processor.
//
// The processor computes a fuzzy inference in stages: acquire the crisp
// inputs and find, for every input, the fuzzy terms it belongs to; detect the
// rules whose every antecedent is such a term (active rules); compute the
// degree of each active rule and accumulate the output sums (the theta unit);
// divide the sums to get the crisp outputs. This top holds the first two
// stages in the rule detection unit (rdu) and the last in the defuzzifier.
// The theta unit between them is not part of this design: the active-rule
// vector leaves as rules, and the defuzzifier's sums and data-ready strobe
// come in as ports, so an external theta unit (or a testbench) closes the
// loop. The two halves run independently and can overlap, as in a pipeline.
//
// Interface: rdu_* ports start an inference and load the rule base and the
// term supports (see rdu); dfz_* ports feed and read the defuzzifier (see
// defuzzifier). Timing: as for the two sub-blocks.
module cfuzzy_processor
  import cfl_pkg::*;
#(
  parameter int unsigned N_GROUPS = 2**PTR_AW
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // rule detection
  input  logic                        rdu_start,
  input  logic [N_IN-1:0][X_W-1:0]    x,
  output logic                        rdu_acq_ready,
  output logic                        rdu_busy,
  output logic                        rdu_done,
  output logic [N_RULES-1:0]          rules,
  input  logic                        id1_cfg_we,
  input  logic                        id2_cfg_we,
  input  logic [$clog2(SHIFT_W)-1:0]  id_cfg_addr,
  input  support_t                    id_cfg_data,
  input  logic                        pm_we,
  input  logic [PM_AW-1:0]            pm_waddr,
  input  logic [PM_DW-1:0]            pm_wdata,
  input  logic                        ptr_we,
  input  logic [PTR_AW-1:0]           ptr_waddr,
  input  ptr_entry_t                  ptr_wdata,
  // defuzzification
  input  logic                        dfz_data_ready,
  input  logic [1:0][NUM_W-1:0]       sum_thx,
  input  logic [1:0][DEN_W-1:0]       sum_th,
  output logic                        dfz_busy,
  output logic                        dfz_done,
  output logic [Q_W-1:0]              xd_now,
  output logic                        xd_valid,
  output logic                        xd_ch,
  output logic [1:0][Q_W-1:0]         xd
);

  rdu #(.N_GROUPS (N_GROUPS)) u_rdu (
    .clk, .rst_n,
    .start (rdu_start), .x, .acq_ready (rdu_acq_ready), .busy (rdu_busy), .done (rdu_done), .rules,
    .id1_cfg_we, .id2_cfg_we, .id_cfg_addr, .id_cfg_data,
    .pm_we, .pm_waddr, .pm_wdata, .ptr_we, .ptr_waddr, .ptr_wdata
  );

  defuzzifier #(.N_OUT (2)) u_dfz (
    .clk, .rst_n,
    .data_ready (dfz_data_ready), .sum_thx, .sum_th,
    .busy (dfz_busy), .done (dfz_done), .xd_now, .xd_valid, .xd_ch, .xd
  );

endmodule
