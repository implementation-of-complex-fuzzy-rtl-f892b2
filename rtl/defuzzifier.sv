// defuzzifier: crisp outputs from the accumulated rule sums, one divider shared.
//
// For each fuzzy output k the theta unit delivers the sum of the rule degrees
// weighted by the rules' output values, sum_thx[k] (NUM_W bits), and the sum of
// the degrees, sum_th[k] (DEN_W bits); the crisp value is their quotient
// (centre-of-gravity style). Both pairs are stored in registers on data_ready;
// a control unit then routes each pair in turn through two multiplexers into a
// single divider and keeps each result in xd[k]. xd_now is the divider output
// itself, with xd_valid/xd_ch marking the clock each result appears. The
// register pairs, the multiplexers, the one divider and the widths (22 and 14
// bits in, 8 bits out, two outputs) follow the architecture; the handshake,
// the storage of each result and the divider's algorithm are this design's.
//
// Timing: data_ready in clock t; output 0 at about t+11, output 1 about 10
// clocks later, then done pulses. data_ready while busy is ignored.
module defuzzifier #(
  parameter int unsigned N_OUT = 2,
  parameter int unsigned NUM_W = cfl_pkg::NUM_W,
  parameter int unsigned DEN_W = cfl_pkg::DEN_W,
  parameter int unsigned Q_W   = cfl_pkg::Q_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        data_ready,
  input  logic [N_OUT-1:0][NUM_W-1:0] sum_thx,
  input  logic [N_OUT-1:0][DEN_W-1:0] sum_th,
  output logic                        busy,
  output logic                        done,
  output logic [Q_W-1:0]              xd_now,
  output logic                        xd_valid,
  output logic [$clog2(N_OUT)-1:0]    xd_ch,
  output logic [N_OUT-1:0][Q_W-1:0]   xd
);

  logic [N_OUT-1:0][NUM_W-1:0] thx_reg;
  logic [N_OUT-1:0][DEN_W-1:0] th_reg;
  logic [$clog2(N_OUT)-1:0]    sel;
  logic                        div_start, div_done, div_busy, cap, load;
  logic [NUM_W-1:0]            mux_num;
  logic [DEN_W-1:0]            mux_den;

  assign load = data_ready && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thx_reg <= '0;
      th_reg  <= '0;
    end else if (load) begin
      thx_reg <= sum_thx;
      th_reg  <= sum_th;
    end
  end

  // The two multiplexers in front of the divider.
  assign mux_num = thx_reg[sel];
  assign mux_den = th_reg[sel];

  defuzz_cu #(.N_OUT (N_OUT)) u_cu (
    .clk, .rst_n, .data_ready, .div_done, .busy, .sel,
    .div_start, .cap, .all_done (done)
  );

  defuzz_divider #(.NUM_W (NUM_W), .DEN_W (DEN_W), .Q_W (Q_W)) u_div (
    .clk, .rst_n, .start (div_start), .num (mux_num), .den (mux_den),
    .busy (div_busy), .done (div_done), .q (xd_now)
  );

  // The control unit only starts the divider when it is idle.
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);

  assign xd_valid = cap;
  assign xd_ch    = sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   xd      <= '0;
    else if (cap) xd[sel] <= xd_now;
  end

endmodule
