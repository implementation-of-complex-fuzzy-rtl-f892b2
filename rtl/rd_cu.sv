// rd_cu: control unit of the rule detection unit.
//
// An inference starts with a start pulse, accepted while acq_ready is high.
// Input acquisition: the unit pulses id_start so both intersection detectors
// stream their ACQ_CYCLES bits into the shifter registers. Once they are full
// and the previous rule walk has finished, int_load copies the shifters into
// the intersection register and rr_clear clears the rule register in the same
// clock; acquisition is then free again, so the inputs of the next inference
// are acquired while the rules of this one are detected (two pipeline stages,
// decoupled by the intersection register). The walk goes through the pointer
// memory, entry 0 to
// N_GROUPS-1. Each entry names the first premise word of a rule group and its
// rule count; the unit reads the group's words one per clock (pm_re, pm_raddr),
// four rules per word, and one clock later, when the word has reached the
// execution units, tells the rule register to store the four rule states
// (rr_we) at the running rule number rr_idx, with lanes past the end of the
// group masked off (rr_mask). Groups with no rules are skipped.
//
// The search in the pointer memory for the next group overlaps the premise
// reads of the current group: a pointer read is issued whenever no read is
// outstanding and the one-entry prefetch buffer (nxt) is free, and the
// prefetched entry takes over in the clock in which the current group issues
// its last word, so consecutive groups of two or more words follow each other
// without a gap. Coordinating the RDU, using the pointer table and overlapping
// its search with rule selection follow the architecture; the visiting order,
// the prefetch buffer, the running rule number and the start/done handshake
// are this design's choices.
//
// Timing: memories read with one clock of latency. The first int_load comes
// ACQ_CYCLES+1 clocks after start. done is a one-clock pulse in the clock
// after the last rule-register write has taken effect; the rule register keeps
// its value through the done clock and the one after it at least, and is
// cleared by the next int_load, which comes no earlier than that.
module rd_cu
  import cfl_pkg::*;
#(
  parameter int unsigned N_GROUPS   = 2**PTR_AW,
  parameter int unsigned ACQ_CYCLES = SHIFT_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                acq_ready,
  output logic                busy,
  output logic                done,
  // acquisition
  output logic                id_start,
  output logic                int_load,
  // pointer memory
  output logic                ptr_re,
  output logic [PTR_AW-1:0]   ptr_raddr,
  input  ptr_entry_t          ptr_rdata,
  // premise memory
  output logic                pm_re,
  output logic [PM_AW-1:0]    pm_raddr,
  // rule register
  output logic                rr_clear,
  output logic                rr_we,
  output logic [RIDX_W-1:0]   rr_idx,
  output logic [N_EU-1:0]     rr_mask
);

  typedef enum logic [1:0] {A_IDLE, A_SHIFT, A_FULL} acq_t;
  typedef enum logic [1:0] {W_IDLE, W_WALK, W_DONE} walk_t;

  acq_t                      acq;
  walk_t                     walk;
  logic [$clog2(ACQ_CYCLES+1)-1:0] acq_cnt;
  logic [PTR_AW:0]           gp;            // next group to look up
  logic                      ptr_inflight;  // pointer read issued last clock
  logic                      nxt_valid;
  ptr_entry_t                nxt;           // prefetched group
  logic [PM_AW-1:0]          cur_addr;      // next premise word of the current group
  logic [CNT_W-1:0]          cur_rem;       // rules of the current group not yet read
  logic [RIDX_W-1:0]         ridx;          // number of the next rule

  // Walk decisions for this clock.
  logic                      walking, cap_valid, issue, last_word, take, take_nxt, ptr_issue, walk_end;
  logic [CNT_W-1:0]          lanes;
  ptr_entry_t                cand;

  always_comb begin
    walking   = (walk == W_WALK);
    cap_valid = walking && ptr_inflight && (ptr_rdata.count != '0);
    issue     = walking && (cur_rem != '0);
    lanes     = (cur_rem > CNT_W'(N_EU)) ? CNT_W'(N_EU) : cur_rem;
    last_word = (cur_rem <= CNT_W'(N_EU));          // also true when idle (0)
    cand      = nxt_valid ? nxt : ptr_rdata;
    take      = walking && last_word && (nxt_valid || cap_valid);
    take_nxt  = take && nxt_valid;
    ptr_issue = walking && (gp < (PTR_AW+1)'(N_GROUPS)) && !ptr_inflight && (!nxt_valid || take_nxt);
    walk_end  = walking && (cur_rem == '0) && !nxt_valid && !ptr_inflight && (gp >= (PTR_AW+1)'(N_GROUPS));
  end

  assign acq_ready = (acq == A_IDLE);
  assign busy      = (acq != A_IDLE) || (walk != W_IDLE);
  assign done      = (walk == W_DONE);
  assign id_start  = (acq == A_IDLE) && start;
  assign int_load  = (acq == A_FULL) && (walk == W_IDLE);
  assign rr_clear  = int_load;
  assign ptr_re    = ptr_issue;
  assign ptr_raddr = gp[PTR_AW-1:0];
  assign pm_re     = issue;
  assign pm_raddr  = cur_addr;

  // Acquisition stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acq     <= A_IDLE;
      acq_cnt <= '0;
    end else begin
      unique case (acq)
        A_IDLE:  if (start) begin
          acq     <= A_SHIFT;
          acq_cnt <= '0;
        end
        A_SHIFT: begin
          acq_cnt <= acq_cnt + 1'b1;
          if (acq_cnt == ($clog2(ACQ_CYCLES+1))'(ACQ_CYCLES - 1)) acq <= A_FULL;
        end
        A_FULL:  if (int_load) acq <= A_IDLE;
        default: acq <= A_IDLE;
      endcase
    end
  end

  // Rule-walk stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      walk         <= W_IDLE;
      gp           <= '0;
      ptr_inflight <= 1'b0;
      nxt_valid    <= 1'b0;
      nxt          <= '0;
      cur_addr     <= '0;
      cur_rem      <= '0;
      ridx         <= '0;
      rr_we        <= 1'b0;
      rr_idx       <= '0;
      rr_mask      <= '0;
    end else begin
      // Rule-register write one clock after the premise read.
      rr_we   <= issue;
      rr_idx  <= ridx;
      for (int j = 0; j < N_EU; j++) rr_mask[j] <= issue && (CNT_W'(j) < lanes);

      unique case (walk)
        W_IDLE: if (int_load) begin
          walk         <= W_WALK;
          gp           <= '0;
          ptr_inflight <= 1'b0;
          nxt_valid    <= 1'b0;
          cur_rem      <= '0;
          ridx         <= '0;
        end
        W_WALK: begin
          ptr_inflight <= ptr_issue;
          if (ptr_issue) gp <= gp + 1'b1;
          if (issue) begin
            cur_addr <= cur_addr + 1'b1;
            cur_rem  <= cur_rem - lanes;
            ridx     <= ridx + RIDX_W'(lanes);
          end
          if (take) begin
            cur_addr <= cand.first;
            cur_rem  <= cand.count;
          end
          // Prefetch buffer: emptied when taken, filled by a returning read
          // that was not taken directly.
          if (take_nxt) nxt_valid <= 1'b0;
          if (cap_valid && !(take && !nxt_valid)) begin
            nxt_valid <= 1'b1;
            nxt       <= ptr_rdata;
          end
          if (walk_end) walk <= W_DONE;
        end
        W_DONE:  walk <= W_IDLE;
        default: walk <= W_IDLE;
      endcase
    end
  end

  // A returning pointer entry must always find the prefetch buffer free.
  a_prefetch_free: assert property (@(posedge clk) disable iff (!rst_n)
    ptr_inflight && walking |-> !nxt_valid || take_nxt);

endmodule
