// Serial two's-complement multiplier, rows-and-diagonals class, using the
// sign-extended array: stack-register generator rd_gen_se feeding the
// doubling-weight summer rd_summer_se.
//
// Timing: start is high in cycle t_0 together with x_0 and y_0; x_k, y_k follow
// in t_1 .. t_(N-1). Product bit P_k comes out combinationally on p_bit in cycle
// t_k, k = 0 .. 2N-2 (p_valid). The product has 2N-1 bits: it is exact for all
// factors except (-2^(N-1)) * (-2^(N-1)), whose product needs 2N bits. A new start
// may follow t_(2N-2) directly.
module rd_mult_se #(
  parameter int N = 4
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
  localparam int PW = 2 * N - 1;

  logic          active, last, clr;
  logic [SW-1:0] step;
  logic [N-1:0]  r;
  logic [N-2:0]  d;

  step_timer #(.STEPS(PW), .SW(SW)) u_tmr (
    .clk, .rst_n, .start, .active, .step, .last
  );

  assign clr     = last || !active;
  assign p_valid = active;

  rd_gen_se #(.N(N)) u_gen (
    .clk, .rst_n, .active, .step, .clr, .x_bit, .y_bit, .r, .d
  );

  rd_summer_se #(.N(N)) u_sum (
    .clk, .rst_n, .clr, .r, .d, .p_bit
  );
endmodule
