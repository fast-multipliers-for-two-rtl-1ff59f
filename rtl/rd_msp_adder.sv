// Parallel most-significant part for the fourfold-weight row/diagonal
// multiplier. Once the last terms have entered at t_sigma = t_(N-1), no new
// array term follows: the product bits P_N .. P_(PW-1) equal the sum of the
// carries that the summer stores from t_(N-1) to t_N. This block forms that sum
// during t_(N-1): the three rows of carry cells are weighted (column p of step N
// has weight 2^(N-p) relative to P_N), reduced to two rows by a row of full
// adders with no carry propagation, and the two rows are added.
// Inputs are the summer's m0/m1/m2 next-state vectors; `hi` is valid while they
// belong to t_(N-1).
module rd_msp_adder #(
  parameter int N  = 4,
  parameter int PW = 2 * N - 1
) (
  input  logic [PW:0]     m0_nxt,
  input  logic [PW:0]     m1_nxt,
  input  logic [PW:0]     m2_nxt,
  output logic [PW-N-1:0] hi
);
  localparam int HW = PW - N;

  logic [HW-1:0] a, b, c, s, cy;

  // bit b of a row is the cell of column p = N - b, index p + 1 = N + 1 - b
  always_comb begin
    for (int i = 0; i < HW; i++) begin
      a[i] = (N + 1 - i >= 0) ? m0_nxt[(N + 1 - i >= 0) ? N + 1 - i : 0] : 1'b0;
      b[i] = (N + 1 - i >= 0) ? m1_nxt[(N + 1 - i >= 0) ? N + 1 - i : 0] : 1'b0;
      c[i] = (N + 1 - i >= 0) ? m2_nxt[(N + 1 - i >= 0) ? N + 1 - i : 0] : 1'b0;
    end
    s  = a ^ b ^ c;
    cy = ((a & b) | (a & c) | (b & c)) << 1;
    hi = s + cy;
  end
endmodule
