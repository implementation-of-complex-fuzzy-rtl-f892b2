// defuzz_divider: the single divider of the defuzzifier.
//
// Computes the crisp output X_D = floor(num / den), where num is the sum of
// degree-weighted output values (NUM_W bits) and den the sum of degrees
// (DEN_W bits). Restoring long division, one quotient bit per clock from the
// most significant: at step i the divisor shifted left by i is subtracted from
// the partial remainder when it fits. A quotient that does not fit Q_W bits
// saturates to all ones and a zero divisor gives 0. The widths (22/14 -> 8)
// follow the architecture; the algorithm, rounding (truncation), saturation
// and divide-by-zero result are this design's choices.
//
// Timing: start (one clock, inputs sampled then); done pulses Q_W clocks
// after the start clock (2 clocks for a zero divisor or a saturated result) with q valid and
// held until the next start. start while busy is ignored.
module defuzz_divider #(
  parameter int unsigned NUM_W = cfl_pkg::NUM_W,
  parameter int unsigned DEN_W = cfl_pkg::DEN_W,
  parameter int unsigned Q_W   = cfl_pkg::Q_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [Q_W-1:0]   q
);

  localparam int unsigned RW = NUM_W + 1;   // partial remainder, with guard bit
  localparam int unsigned DW = DEN_W + Q_W; // widest shifted divisor

  logic [NUM_W-1:0]          rem;
  logic [DEN_W-1:0]          den_q;
  logic [$clog2(Q_W+1)-1:0]  step;     // bits still to produce
  logic [DW-1:0]             den_sh;
  logic                      fits;
  logic [$clog2(Q_W)-1:0]    bitpos;

  always_comb begin
    bitpos = ($clog2(Q_W))'(step - 1'b1);
    den_sh = DW'(den_q) << bitpos;
    fits   = (RW'(rem) >= RW'(den_sh));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem   <= '0;
      den_q <= '0;
      step  <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      q     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        rem   <= num;
        den_q <= den;
        step  <= ($clog2(Q_W+1))'(Q_W);
        q     <= '0;
        if (den == '0) begin
          step <= '0;                          // finish at once with 0
        end else if ((DW+1)'(num) >= ((DW+1)'(den) << Q_W)) begin
          step <= '0;                          // quotient too large
          q    <= '1;
        end
      end else if (busy) begin
        if (step == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          if (fits) rem <= NUM_W'(RW'(rem) - RW'(den_sh));
          q[bitpos] <= fits;
          step      <= step - 1'b1;
          if (step == 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
