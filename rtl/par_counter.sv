// Parallel counter (N_IN;K): a combinational circuit that counts how many of its
// N_IN equal-weight inputs are 1 and presents the count as a K-bit binary number,
// K = ceil(log2(N_IN+1)). A full adder is the (3;2) case, a half adder the (2;2)
// case. The count is formed as a plain sum of the input bits, leaving the choice
// of gate structure to synthesis; the multipliers only rely on the counting
// function.
module par_counter #(
  parameter int N_IN = 6
) (
  input  logic [N_IN-1:0]                  in_bits,
  output logic [smul_pkg::cnt_w(N_IN)-1:0] count
);
  localparam int K = smul_pkg::cnt_w(N_IN);

  always_comb begin
    count = '0;
    for (int i = 0; i < N_IN; i++) count = count + K'(in_bits[i]);
  end
endmodule
