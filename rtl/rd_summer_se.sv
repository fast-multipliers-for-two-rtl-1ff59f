// Summer for the row/diagonal generator whose output weights double per step
// (rd_gen_se).
//
// Column q (q = 0 .. N-1) holds, at bit time t_k, the bits of weight 2^(k+q);
// column 0 is the product column. A count bit of weight 2^j leaving column q
// lands in column q+j-1 one step later, so column q can receive r[q], d[q] and
// three carry cells: the weight-1 count bit of column q+1, the weight-2 bit of
// column q itself and the weight-4 bit of column q-1.
// Columns 1 .. N-2 have a (5;3) counter. Column 0 has no column to its right,
// so it gets r[0], d[0] and two cells: a (4;3) counter. The leftmost column,
// N-1, keeps no cells at all: anything landing there at t_k has weight
// 2^(k+N-1) or more and, for the 2N-1 product bits, could only matter while
// k <= N-2, when that column cannot yet hold a carry. So r[N-1] passes straight
// through as its only count bit, and the weight-4 bit of column N-2 is dropped.
// This gives 3 + 3 + 2 = 8 carry cells for N = 4. The weight-1 bit of column 0
// is the product bit P_k, out in cycle t_k. `clr` empties all carry cells.
// N must be at least 3.
module rd_summer_se #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic [N-1:0] r,
  input  logic [N-2:0] d,
  output logic         p_bit
);
  // Carry cells exist for columns 0 .. N-2 (m0, m1) and 1 .. N-2 (m2) only.
  logic [N-2:0] m0, m1, m0n, m1n;
  logic [N-2:1] m2, m2n;
  logic [2:0]   cnt [N];

  if (N < 3) begin : g_bad_n
    $error("rd_summer_se needs N >= 3");
  end

  for (genvar q = 0; q < N; q++) begin : g_col
    if (q == N - 1) begin : g_pass
      assign cnt[q] = {2'b00, r[q]};
    end else if (q == 0) begin : g_right
      par_counter #(.N_IN(4)) u_cnt (
        .in_bits({r[q], d[q], m0[q], m1[q]}),
        .count  (cnt[q])
      );
    end else begin : g_mid
      par_counter #(.N_IN(5)) u_cnt (
        .in_bits({r[q], d[q], m0[q], m1[q], m2[q]}),
        .count  (cnt[q])
      );
    end
  end

  always_comb begin
    for (int q = 0; q < N - 1; q++) begin
      m0n[q] = cnt[q+1][0];
      m1n[q] = cnt[q][1];
    end
    for (int q = 1; q < N - 1; q++) m2n[q] = cnt[q-1][2];
  end

  assign p_bit = cnt[0][0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m0 <= '0; m1 <= '0; m2 <= '0;
    end else if (clr) begin
      m0 <= '0; m1 <= '0; m2 <= '0;
    end else begin
      m0 <= m0n; m1 <= m1n; m2 <= m2n;
    end
  end
endmodule
