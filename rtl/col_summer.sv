// Column summer made of a single parallel counter. In every cycle it counts
// the T terms of the current array column together with its own earlier count
// bits: the bit of weight 2^j (j >= 1) returns after j cycles, through a j-stage
// register, where it has weight 1. The count bit of weight 1 is the product bit
// of the current column, so one product bit leaves per cycle with no latency.
//
// CW is the counter width; it must satisfy 2^CW - 1 >= T + CW - 1 so that the
// count of T terms plus CW-1 feedback lines always fits (checked below).
// C1_INIT is the value loaded into the one-stage register (the line of weight
// 2) by `clr`: it supplies an initial carry of 1 for arrays that need a
// corrective one in column 0. All other stages clear to 0.
module col_summer #(
  parameter int T       = 4,
  parameter int CW      = 3,
  parameter bit C1_INIT = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic [T-1:0] terms,
  output logic         p_bit
);
  localparam int NI = T + CW - 1;

  logic [smul_pkg::cnt_w(NI)-1:0] count;
  logic [CW-1:1]                  fb;                  // feedback line j, weight 1 now
  logic [CW-1:0]                  dly [CW];            // dly[j][0..j-1]: stages of line j

  par_counter #(.N_IN(NI)) u_cnt (.in_bits({fb, terms}), .count(count));

  always_comb for (int j = 1; j < CW; j++) fb[j] = dly[j][j-1];

  assign p_bit = count[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < CW; j++) dly[j] <= '0;
      dly[1][0] <= C1_INIT;
    end else if (clr) begin
      for (int j = 0; j < CW; j++) dly[j] <= '0;
      dly[1][0] <= C1_INIT;
    end else begin
      for (int j = 1; j < CW; j++) begin
        dly[j][0] <= count[j];
        for (int s = 1; s < j; s++) dly[j][s] <= dly[j][s-1];
      end
    end
  end

  initial assert (smul_pkg::cnt_w(NI) <= CW)
    else $error("col_summer: CW too small for %0d inputs", NI);
endmodule
