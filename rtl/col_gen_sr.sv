// Column generator for the array in which the first N-1 rows are sign extended
// and the sign row is replaced by its complement (Fig. 4 array of the design).
//
// X runs through a shift register: xs[s] = x_(k-s) at bit time t_k, the newest
// bit taken straight from the input. After the sign bit the first stage keeps
// re-entering sigma_x, which sign-extends X. Y goes into a stack register:
// ys[s] = y_s once it has arrived, 0 before. The AND gates pair xs[s] with ys[s],
// so at t_k the outputs are the terms of array column k:
//   t[s] = x_(k-s) & y_s                 s = 0 .. N-2
//   t[N-1] = NOT (x_(k-N+1) & sigma_y)   (the negator on the bottom output)
// While y_(N-1) has not arrived the negator turns the zero term into 1: these
// ones at t_0 .. t_(N-2), plus the summer's initial carry, form the corrective
// constant 2^(N-1) of the complemented row. `clr` empties both registers.
module col_gen_sr #(
  parameter int N = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     active,
  input  logic [$clog2(2*N+1)-1:0] step,
  input  logic                     clr,
  input  logic                     x_bit,
  input  logic                     y_bit,
  output logic [N-1:0]             t
);
  localparam int SW = $clog2(2 * N + 1);

  logic [N-2:0] xreg;   // [0] = x of the previous step
  logic [N-1:0] ystk;   // [s] = y_s
  logic [N-1:0] xs, ys;
  logic         live;

  assign live = active && (step < SW'(N));
  assign xs   = {xreg, (live ? x_bit : xreg[0])};

  always_comb begin
    for (int s = 0; s < N; s++) ys[s] = (live && step == SW'(s)) ? y_bit : ystk[s];
    for (int s = 0; s < N - 1; s++) t[s] = xs[s] & ys[s];
    t[N-1] = ~(xs[N-1] & ys[N-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xreg <= '0; ystk <= '0;
    end else if (clr) begin
      xreg <= '0; ystk <= '0;
    end else if (active) begin
      xreg <= xs[N-2:0];
      if (live) ystk[step[$clog2(N)-1:0]] <= y_bit;
    end
  end
endmodule
