// defuzz_cu: sequences the shared divider of the defuzzifier.
//
// When the theta unit signals that the sums are ready (data_ready, the same
// clock in which the sum registers load), the unit steps through the outputs
// 0 .. N_OUT-1: for each it sets the multiplexer select sel, pulses div_start,
// waits for div_done and then pulses cap so the result is stored for output
// sel. After the last output it pulses all_done. One control unit driving both
// multiplexers and the divider start follows the architecture; the output
// order and the handshake are this design's choices.
//
// Timing: per output one clock to start plus the divider time; data_ready
// while busy is ignored.
module defuzz_cu #(
  parameter int unsigned N_OUT = 2
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           data_ready,
  input  logic                           div_done,
  output logic                           busy,
  output logic [$clog2(N_OUT)-1:0]       sel,
  output logic                           div_start,
  output logic                           cap,
  output logic                           all_done
);

  localparam int unsigned SW = $clog2(N_OUT);

  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT, S_DONE} state_t;
  state_t state;

  assign busy      = (state != S_IDLE);
  assign div_start = (state == S_START);
  assign cap       = (state == S_WAIT) && div_done;
  assign all_done  = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      sel   <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (data_ready) begin
          state <= S_START;
          sel   <= '0;
        end
        S_START: state <= S_WAIT;
        S_WAIT:  if (div_done) begin
          if (sel == SW'(N_OUT - 1)) state <= S_DONE;
          else begin
            sel   <= sel + 1'b1;
            state <= S_START;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
