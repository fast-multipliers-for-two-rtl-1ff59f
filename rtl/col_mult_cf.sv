// Serial two's-complement multiplier, column class, with the counter-flow
// column generator col_gen_cf and a single-counter summer (col_summer) wide
// enough for its 2N-1 terms per column plus its own feedback lines (for N = 4:
// 7 terms + 3 feedback lines into a (10;4) counter). The counter size is this
// design's choice; only "a parallel counter with a suitable number of inputs"
// is given.
//
// Timing: start marks cycle 0. The multiplier samples y_m in cycle 2m and x_m in
// cycle 2m+1 (y_take / x_take tell when), m = 0 .. N-1, so the factors enter at
// one bit per two cycles. Product bit P_c leaves on p_bit in cycle N + 1 + c,
// c = 0 .. 2N-2, one per cycle (p_valid), so output overlaps input. The
// product has 2N-1 bits and is exact except for (-2^(N-1))^2. The whole
// operation takes 3N cycles; a new start may follow directly.
module col_mult_cf #(
  parameter int N = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic x_bit,
  input  logic y_bit,
  output logic x_take,
  output logic y_take,
  output logic p_bit,
  output logic p_valid
);
  localparam int SW    = $clog2(3 * N + 1);
  localparam int L     = 2 * N - 1;
  localparam int STEPS = 3 * N;
  localparam int CW    = smul_pkg::cf_cnt_w(L);

  logic          active, last, clr;
  logic [SW-1:0] step;
  logic [L-1:0]  t;

  step_timer #(.STEPS(STEPS), .SW(SW)) u_tmr (
    .clk, .rst_n, .start, .active, .step, .last
  );

  assign clr     = last || !active;
  assign p_valid = active && (step >= SW'(N + 1));

  col_gen_cf #(.N(N)) u_gen (
    .clk, .rst_n, .active, .step, .clr, .x_bit, .y_bit, .x_take, .y_take, .t
  );

  col_summer #(.T(L), .CW(CW), .C1_INIT(1'b0)) u_sum (
    .clk, .rst_n, .clr, .terms(t), .p_bit
  );
endmodule
