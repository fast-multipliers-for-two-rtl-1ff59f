// Serial two's-complement multiplier, column class: shift/stack column
// generator col_gen_sr (with negator) feeding a single (N+2;3)-style counter
// (col_summer). For N = 4 the counter has 6 inputs: four column terms, the
// weight-2 output fed back through one register stage (preset to the initial
// carry 1) and the weight-4 output fed back through two stages.
//
// Timing: start is high in cycle t_0 together with x_0 and y_0; x_k, y_k follow
// in t_1 .. t_(N-1). Product bit P_k leaves on p_bit in cycle t_k, k = 0 .. PW-1
// (p_valid). PW = 2N-1 (default) is exact except for (-2^(N-1))^2; PW = 2N gives
// the full range. A new start may follow t_(PW-1) directly.
module col_mult_sr #(
  parameter int N  = 4,
  parameter int PW = 2 * N - 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic x_bit,
  input  logic y_bit,
  output logic p_bit,
  output logic p_valid
);
  localparam int SW = $clog2(2 * N + 1);
  localparam int CW = smul_pkg::cf_cnt_w(N);

  logic          active, last, clr;
  logic [SW-1:0] step;
  logic [N-1:0]  t;

  step_timer #(.STEPS(PW), .SW(SW)) u_tmr (
    .clk, .rst_n, .start, .active, .step, .last
  );

  assign clr     = last || !active;
  assign p_valid = active;

  col_gen_sr #(.N(N)) u_gen (
    .clk, .rst_n, .active, .step, .clr, .x_bit, .y_bit, .t
  );

  col_summer #(.T(N), .CW(CW), .C1_INIT(1'b1)) u_sum (
    .clk, .rst_n, .clr, .terms(t), .p_bit
  );

  initial assert (PW == 2 * N - 1 || PW == 2 * N)
    else $error("col_mult_sr: PW must be 2N-1 or 2N");
endmodule
