// intersection_detector: finds which fuzzy terms each crisp input falls into.
//
// For each of its N_VARS crisp inputs and each of the N_TERMS fuzzy terms of
// that input, the detector emits one bit that is 1 when the input lies inside
// the term's support, i.e. when its degree of membership in the term is above
// zero. The bits leave serially, one per clock, toward a shifter register:
// variable 0 term 0 first, term index running fastest.
//
// How it works: each term's support is an inclusive interval [lo, hi] held in
// a register table written through the cfg_* port (an empty support, lo > hi,
// never matches; that is the reset value). A start pulse samples the inputs;
// for the next N_VARS*N_TERMS clocks bit_valid is high and bit_out is the
// comparison for term number cnt. The serial link to a shifter register and the
// two detectors of 4 variables each follow the architecture; comparing against
// support bounds, the table and the bit order are this design's own choices.
//
// Timing: start in cycle t; bits in cycles t+1 .. t+N_VARS*N_TERMS.
module intersection_detector #(
  parameter int unsigned N_VARS  = cfl_pkg::ID_VARS,
  parameter int unsigned N_TERMS = cfl_pkg::N_TERMS
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // support table load
  input  logic                               cfg_we,
  input  logic [$clog2(N_VARS*N_TERMS)-1:0]  cfg_addr,   // var*N_TERMS + term
  input  cfl_pkg::support_t                  cfg_data,
  // acquisition
  input  logic                               start,
  input  logic [N_VARS-1:0][cfl_pkg::X_W-1:0] x,
  output logic                               bit_out,
  output logic                               bit_valid
);

  localparam int unsigned NB = N_VARS * N_TERMS;
  localparam int unsigned CW = $clog2(NB);

  cfl_pkg::support_t           sup [NB];
  logic [N_VARS-1:0][cfl_pkg::X_W-1:0] x_q;
  logic [CW-1:0]               cnt;
  logic [$clog2(N_VARS)-1:0]   var_idx;
  logic [cfl_pkg::X_W-1:0]     xv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NB; i++) sup[i] <= '{hi: '0, lo: '1};
    end else if (cfg_we) begin
      sup[cfg_addr] <= cfg_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q       <= '0;
      cnt       <= '0;
      bit_valid <= 1'b0;
    end else if (start) begin
      x_q       <= x;
      cnt       <= '0;
      bit_valid <= 1'b1;
    end else if (bit_valid) begin
      if (cnt == CW'(NB - 1)) bit_valid <= 1'b0;
      else                    cnt       <= cnt + 1'b1;
    end
  end

  always_comb begin
    var_idx = ($clog2(N_VARS))'(cnt / CW'(N_TERMS));
    xv      = x_q[var_idx];
    bit_out = bit_valid && (xv >= sup[cnt].lo) && (xv <= sup[cnt].hi);
  end

endmodule
