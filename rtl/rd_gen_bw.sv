// Row/diagonal array generator for the modified (Baugh-Wooley style) array in
// which every term is non-negative (Fig. 3 array of the design).
//
// At bit time t_k the newest bits x_k, y_k arrive and the generator presents the
// partial row R_k and the partial diagonal D_k, i.e. every array term that can be
// formed from x_k or y_k together with the bits received earlier:
//   r[p] = x_(k-p) & y_k   p = 0..N-1   (weight 2^(2k-p))
//   d[p] = x_k & y_(k-p)   p = 1..N-1   (weight 2^(2k-p))
// so outputs of equal index carry equal weight, and the weight of every output
// grows fourfold from one step to the next. X and Y are shift registers
// holding the previous N-1 bits; the newest bit is used straight from the input,
// so the terms of t_k are available in cycle t_k itself.
//
// In the sign cycle t_sigma = t_(N-1) the switch array complements the terms that
// involve exactly one sign bit (r[1..N-1] and all d[]); r[0] = sigma_x*sigma_y
// passes unchanged, as the arithmetic of the array requires. After t_sigma the
// inputs are ignored and the outputs are 0.
//
// Interface: `active`/`step` come from the multiplier's step timer; `clr` empties
// both registers at the next clock edge (used at the end of an operation).
module rd_gen_bw #(
  parameter int N = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   active,
  input  logic [$clog2(2*N+1)-1:0] step,
  input  logic                   clr,
  input  logic                   x_bit,
  input  logic                   y_bit,
  output logic [N-1:0]           r,
  output logic [N-1:1]           d
);
  localparam int SW = $clog2(2 * N + 1);

  logic [N-2:0] xreg, yreg;   // [0] = bit of the previous step
  logic [N-1:0] xs, ys;       // [p] = x_(k-p), y_(k-p)
  logic         live, sig, xn, yn;

  assign live = active && (step < SW'(N));
  assign sig  = active && (step == SW'(N - 1));
  assign xn   = live & x_bit;
  assign yn   = live & y_bit;
  assign xs   = {xreg, xn};
  assign ys   = {yreg, yn};

  always_comb begin
    for (int p = 0; p < N; p++) r[p] = (xs[p] & ys[0]) ^ (sig && p != 0);
    for (int p = 1; p < N; p++) d[p] = (xs[0] & ys[p]) ^ sig;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xreg <= '0;
      yreg <= '0;
    end else if (clr) begin
      xreg <= '0;
      yreg <= '0;
    end else if (active) begin
      xreg <= xs[N-2:0];
      yreg <= ys[N-2:0];
    end
  end
endmodule
