// Summer for the row/diagonal generator whose output weights grow fourfold per
// step (rd_gen_bw).
//
// The summer is a row of columns. Column p (p = -1 .. PW-1) holds, at bit time
// t_k, the bits of weight 2^(2k-p). Each column feeds a parallel counter with
//   - r[p] and d[p] from the generator (where they exist),
//   - a constant 1 at t_sigma = t_(N-1) in columns p = -1 (weight 2^(2N-1)) and
//     p = N-2 (weight 2^N): the two corrective ones of the non-negative array,
//   - three carry cells: the weight-1 count bit of column p-2, the weight-2 bit
//     of column p-1 and the weight-4 bit of column p, all from the previous step.
// A count bit of weight 2^j leaving column p lands, one step later, in column
// p-j+2: counter outputs span three columns and are fed back shifted two
// columns to the right, matching the fourfold weight change of the generator.
// Each column's counter takes only the inputs that can ever be 1 (see
// smul_pkg::bw_mask): for N = 4 that is a single input in the two leftmost
// columns, then (3;2), (6;3), (5;3) and (2;2) counters. No column has more
// than six inputs, so three count bits always suffice.
//
// Column k at t_k has weight 2^k and no later bit can reach it, so its weight-1
// count bit is the product bit P_k. That bit is taken out (p_cols[k]) and not fed
// back; columns to its right are then provably empty. `p_bit` is the single-wire
// form: the OR of the column outputs, each gated by its own bit time.
// m*_nxt expose the carries that will be stored at the end of the current step
// (used for the parallel high part). `clr` empties all carry cells. Bits of
// m*_nxt for cells that can never receive a 1 (those left out by bw_mask) are
// constant 0; they stay in the port so that the vectors line up by column.
module rd_summer_bw #(
  parameter int N  = 4,
  parameter int PW = 2 * N - 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     active,
  input  logic [$clog2(2*N+1)-1:0] step,
  input  logic                     clr,
  input  logic [N-1:0]             r,
  input  logic [N-1:1]             d,
  output logic [PW-1:0]            p_cols,
  output logic                     p_bit,
  output logic [PW:0]              m0_nxt,
  output logic [PW:0]              m1_nxt,
  output logic [PW:0]              m2_nxt
);
  localparam int SW = $clog2(2 * N + 1);
  localparam int NC = PW + 1;           // columns p = -1 .. PW-1, index c = p + 1

  logic [NC-1:0] m0, m1, m2;            // carry cells, indexed by column
  logic [2:0]    cnt [NC];
  logic          sig;

  assign sig = active && (step == SW'(N - 1));

  for (genvar c = 0; c < NC; c++) begin : g_col
    localparam int P           = c - 1;
    localparam logic [5:0] MSK = smul_pkg::bw_mask(N, PW, P);
    localparam int NI          = $countones(MSK);
    logic       r_in, d_in, one_in;
    logic [5:0] cand;
    logic [NI-1:0]                  vin;
    logic [smul_pkg::cnt_w(NI)-1:0] cc;
    assign r_in   = (P >= 0 && P < N) ? r[(P >= 0 && P < N) ? P : 0] : 1'b0;
    assign d_in   = (P >= 1 && P < N) ? d[(P >= 1 && P < N) ? P : 1] : 1'b0;
    assign one_in = sig && (P == -1 || P == N - 2);
    assign cand   = {m2[c], m1[c], m0[c], one_in, d_in, r_in};
    // keep only the inputs that can be 1: an (NI;k) counter per column
    always_comb begin
      int k;
      k = 0;
      vin = '0;
      for (int j = 0; j < 6; j++)
        if (MSK[j]) begin
          vin[k] = cand[j];
          k++;
        end
    end
    par_counter #(.N_IN(NI)) u_cnt (.in_bits(vin), .count(cc));
    assign cnt[c] = 3'(cc);
  end

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      m0_nxt[c] = (c >= 2) ? cnt[(c >= 2) ? c - 2 : 0][0] & (SW'(c - 3) != step) : 1'b0;
      m1_nxt[c] = (c >= 1) ? cnt[(c >= 1) ? c - 1 : 0][1] : 1'b0;
      m2_nxt[c] = cnt[c][2];
    end
    for (int k = 0; k < PW; k++) p_cols[k] = cnt[k + 1][0];
    p_bit = 1'b0;
    for (int k = 0; k < PW; k++) p_bit |= active && (step == SW'(k)) && p_cols[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m0 <= '0; m1 <= '0; m2 <= '0;
    end else if (clr) begin
      m0 <= '0; m1 <= '0; m2 <= '0;
    end else begin
      m0 <= m0_nxt; m1 <= m1_nxt; m2 <= m2_nxt;
    end
  end
endmodule
