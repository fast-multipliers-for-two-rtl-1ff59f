// Column generator for the sign-extended array (Fig. 2 array of the design)
// built from two shift registers that move in opposite directions and are
// clocked alternately.
//
// Y enters at the bottom and shifts up; X enters at the top and shifts down.
// Y shifts in even cycles (t'), X in odd cycles (t''), so every cycle the two
// streams slide one stage past each other and the index sum i+j of all facing
// pairs grows by one: each cycle presents one whole column of the array.
// yr[0] is the Y input stage, xr[0] the X input stage. The N plain stages of
// each register face each other: gate a pairs yr[a] with xr[N-1-a]. Both
// registers are lengthened by extension stages (the asterisk stages of the
// figure), so that the late columns get all their sign-extension terms:
//   - Y gets N/2 (rounded down) stages beyond its plain part. Their bits are
//     ANDed with xr[0], which holds sigma_x by the time they are non-zero.
//   - X gets (N-1)/2 (rounded down) stages beyond its plain part. Their bits
//     are ANDed with yr[0], which holds sigma_y by then.
// For N = 4 that is 6 Y stages and 5 X stages, and 4 + 2 + 1 = 7 gates.
// Bits enter at half the column rate: y_m is sampled in cycle 2m and x_m in
// cycle 2m+1 after start (y_take/x_take), m < N. Afterwards each input stage
// keeps re-entering its sign bit, which sign-extends the factor. The terms are
// taken from the registers only, so column c (0 .. 2N-2) is on `t` in cycle
// N + 1 + c after start; before that every gate sees a still-empty stage and
// gives 0. `clr` empties both registers.
module col_gen_cf #(
  parameter int N = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     active,
  input  logic [$clog2(3*N+1)-1:0] step,
  input  logic                     clr,
  input  logic                     x_bit,
  input  logic                     y_bit,
  output logic                     x_take,
  output logic                     y_take,
  output logic [2*N-2:0]           t
);
  localparam int SW = $clog2(3 * N + 1);
  localparam int EY = N / 2;            // Y extension stages
  localparam int EX = (N - 1) / 2;      // X extension stages
  localparam int LY = N + EY;
  localparam int LX = N + EX;

  logic [LY-1:0] yr;
  logic [LX-1:0] xr;
  logic          feed;

  assign feed   = active && (step < SW'(2 * N));
  assign y_take = feed && !step[0];
  assign x_take = feed &&  step[0];

  always_comb begin
    for (int a = 0; a < N; a++)  t[a]          = yr[a] & xr[N-1-a];
    for (int e = 0; e < EY; e++) t[N+e]        = yr[N+e] & xr[0];
    for (int e = 0; e < EX; e++) t[N+EY+e]     = xr[N+e] & yr[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr <= '0; yr <= '0;
    end else if (clr) begin
      xr <= '0; yr <= '0;
    end else if (active) begin
      if (!step[0]) yr <= {yr[LY-2:0], (y_take ? y_bit : yr[0])};
      else          xr <= {xr[LX-2:0], (x_take ? x_bit : xr[0])};
    end
  end
endmodule
