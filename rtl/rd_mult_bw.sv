// Serial two's-complement multiplier, rows-and-diagonals class, using the
// non-negative (Baugh-Wooley style) array: generator rd_gen_bw feeding summer
// rd_summer_bw, plus rd_msp_adder for the high half in parallel.
//
// Timing: start is high in cycle t_0, which also carries x_0 and y_0; x_k and
// y_k follow in cycles t_1 .. t_(N-1) (sign bit last). Product bit P_k is
// produced combinationally in cycle t_k, k = 0 .. PW-1, both on its own column
// output p_cols[k] and on the single wire p_bit; p_valid marks t_0 .. t_(PW-1).
// In cycle t_(N-1) p_hi additionally holds P_N .. P_(PW-1) (p_hi_valid).
// With PW = 2N-1 (default) the product is exact when neither factor is -2^(N-1);
// PW = 2N gives the full range. A new start may follow t_(PW-1) directly.
module rd_mult_bw #(
  parameter int N  = 4,
  parameter int PW = 2 * N - 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            x_bit,
  input  logic            y_bit,
  output logic            p_bit,
  output logic            p_valid,
  output logic [PW-1:0]   p_cols,
  output logic [PW-N-1:0] p_hi,
  output logic            p_hi_valid
);
  localparam int SW = $clog2(2 * N + 1);

  logic          active, last, clr;
  logic [SW-1:0] step;
  logic [N-1:0]  r;
  logic [N-1:1]  d;
  logic [PW:0]   m0n, m1n, m2n;

  step_timer #(.STEPS(PW), .SW(SW)) u_tmr (
    .clk, .rst_n, .start, .active, .step, .last
  );

  assign clr        = last || !active;
  assign p_valid    = active;
  assign p_hi_valid = active && (step == SW'(N - 1));

  rd_gen_bw #(.N(N)) u_gen (
    .clk, .rst_n, .active, .step, .clr, .x_bit, .y_bit, .r, .d
  );

  rd_summer_bw #(.N(N), .PW(PW)) u_sum (
    .clk, .rst_n, .active, .step, .clr, .r, .d, .p_cols, .p_bit,
    .m0_nxt(m0n), .m1_nxt(m1n), .m2_nxt(m2n)
  );

  rd_msp_adder #(.N(N), .PW(PW)) u_msp (
    .m0_nxt(m0n), .m1_nxt(m1n), .m2_nxt(m2n), .hi(p_hi)
  );

  initial assert (PW == 2 * N - 1 || PW == 2 * N)
    else $error("rd_mult_bw: PW must be 2N-1 or 2N");
endmodule
