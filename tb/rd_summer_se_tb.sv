// Self-checking testbench for rd_summer_se, independent of the generator: the
// testbench forms the row/diagonal terms of the sign-extended array itself
// (weights doubling per step) and checks each product bit P_k in cycle t_k
// against the signed integer product modulo 2^(2N-1).
module rd_summer_se_tb;
  localparam int N = 4, PW = 2 * N - 1, WATCHDOG = 100000;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b1;
  logic [N-1:0] r = '0;
  logic [N-2:0] d = '0;
  logic p;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
  rd_summer_se #(.N(N)) dut (.clk, .rst_n, .clr, .r, .d, .p_bit(p));

  always #5 clk = ~clk;

  initial begin
    logic [N-1:0] x, y;
    logic [PW-1:0] prod;
    bit xk, yk;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int ix = 0; ix < (1 << N); ix++)
      for (int iy = 0; iy < (1 << N); iy++) begin
        x = N'(ix); y = N'(iy);
        prod = PW'($signed(x) * $signed(y));
        for (int k = 0; k < PW; k++) begin
          @(negedge clk);
          clr = (k == PW - 1);
          xk = x[(k < N) ? k : N - 1];
          yk = y[(k < N) ? k : N - 1];
          for (int q = 0; q < N; q++) r[q] = (q <= k) ? (yk & x[q]) : 1'b0;
          for (int q = 0; q < N - 1; q++) d[q] = (q < k) ? (xk & y[q]) : 1'b0;
          #1;
          check(p == prod[k], $sformatf("x=%0d y=%0d P%0d", $signed(x), $signed(y), k));
        end
      end
    finish_tb();
  end
endmodule
