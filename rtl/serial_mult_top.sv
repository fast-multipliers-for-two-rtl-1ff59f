// Four serial two's-complement multipliers side by side, one of each scheme:
//   a: rows and diagonals, non-negative (Baugh-Wooley style) array, weights x4
//      per step, product bits on separate column outputs and on one wire, high
//      half also in parallel at t_(N-1)                      (rd_mult_bw)
//   b: rows and diagonals, sign-extended array, stack registers, weights x2
//      per step                                              (rd_mult_se)
//   c: columns, shift/stack generator with negator, one 6-input counter
//                                                            (col_mult_sr)
//   d: columns, counter-flow shift registers clocked alternately, one counter
//                                                            (col_mult_cf)
// The four share only clock and reset; each has its own start, serial inputs
// and serial product output, with the timing given in its own module.
module serial_mult_top #(
  parameter int N = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // a
  input  logic             a_start,
  input  logic             a_x,
  input  logic             a_y,
  output logic             a_p,
  output logic             a_p_valid,
  output logic [2*N-2:0]   a_p_cols,
  output logic [N-2:0]     a_p_hi,
  output logic             a_p_hi_valid,
  // b
  input  logic             b_start,
  input  logic             b_x,
  input  logic             b_y,
  output logic             b_p,
  output logic             b_p_valid,
  // c
  input  logic             c_start,
  input  logic             c_x,
  input  logic             c_y,
  output logic             c_p,
  output logic             c_p_valid,
  // d
  input  logic             d_start,
  input  logic             d_x,
  input  logic             d_y,
  output logic             d_x_take,
  output logic             d_y_take,
  output logic             d_p,
  output logic             d_p_valid
);
  rd_mult_bw #(.N(N)) u_a (
    .clk, .rst_n, .start(a_start), .x_bit(a_x), .y_bit(a_y),
    .p_bit(a_p), .p_valid(a_p_valid), .p_cols(a_p_cols),
    .p_hi(a_p_hi), .p_hi_valid(a_p_hi_valid)
  );

  rd_mult_se #(.N(N)) u_b (
    .clk, .rst_n, .start(b_start), .x_bit(b_x), .y_bit(b_y),
    .p_bit(b_p), .p_valid(b_p_valid)
  );

  col_mult_sr #(.N(N)) u_c (
    .clk, .rst_n, .start(c_start), .x_bit(c_x), .y_bit(c_y),
    .p_bit(c_p), .p_valid(c_p_valid)
  );

  col_mult_cf #(.N(N)) u_d (
    .clk, .rst_n, .start(d_start), .x_bit(d_x), .y_bit(d_y),
    .x_take(d_x_take), .y_take(d_y_take), .p_bit(d_p), .p_valid(d_p_valid)
  );
endmodule
