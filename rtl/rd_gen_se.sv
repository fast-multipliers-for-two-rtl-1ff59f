// Row/diagonal array generator for the sign-extended array (Fig. 2 array of
// the design), in which X and Y are extended by repeating their sign bits so
// that every term is a plain AND of two bits.
//
// Two stack registers keep x_0 .. x_(N-1) and y_0 .. y_(N-1) at fixed positions
// (position q holds bit q, loaded once and kept until cleared); two auxiliary
// cells hold the newest bit of each factor. At t_k the outputs are
//   r[q] = y_k & x_q   q = 0..N-1   (weight 2^(k+q))
//   d[q] = x_k & y_q   q = 0..N-2   (weight 2^(k+q)), only q < k
// so equal indices carry equal weight and all weights double per step. In
// cycles t_0 .. t_(N-1) the newest bit is taken straight from the input (and the
// input bit of the stack is bypassed for r[k]); after t_sigma = t_(N-1) nothing
// is loaded any more, the auxiliary cells keep sigma_x and sigma_y, and R and D
// stay unchanged until the end of the product: that is the sign extension.
// `clr` empties stacks and cells at the next clock edge.
module rd_gen_se #(
  parameter int N = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     active,
  input  logic [$clog2(2*N+1)-1:0] step,
  input  logic                     clr,
  input  logic                     x_bit,
  input  logic                     y_bit,
  output logic [N-1:0]             r,
  output logic [N-2:0]             d
);
  localparam int SW = $clog2(2 * N + 1);

  logic [N-1:0] xstk, ystk;   // stack registers, [q] = bit q
  logic         xaux, yaux;   // auxiliary cells: newest bit
  logic         live, xk, yk;
  logic [N-1:0] xv;

  assign live = active && (step < SW'(N));
  assign xk   = live ? x_bit : xaux;
  assign yk   = live ? y_bit : yaux;

  always_comb begin
    for (int q = 0; q < N; q++) xv[q] = (live && step == SW'(q)) ? x_bit : xstk[q];
    for (int q = 0; q < N; q++) r[q] = yk & xv[q];
    for (int q = 0; q < N - 1; q++) d[q] = xk & ystk[q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xstk <= '0; ystk <= '0; xaux <= 1'b0; yaux <= 1'b0;
    end else if (clr) begin
      xstk <= '0; ystk <= '0; xaux <= 1'b0; yaux <= 1'b0;
    end else if (live) begin
      xstk[step[$clog2(N)-1:0]] <= x_bit;
      ystk[step[$clog2(N)-1:0]] <= y_bit;
      xaux <= x_bit;
      yaux <= y_bit;
    end
  end
endmodule
