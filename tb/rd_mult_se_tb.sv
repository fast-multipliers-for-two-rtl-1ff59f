// Self-checking testbench for rd_mult_se (sign-extended array, stack-register
// generator). Every pair of N-bit factors is multiplied back to back; after the
// sign bit the inputs carry random bits that must be ignored. Product bit P_k is
// checked in cycle t_k against the signed integer product modulo 2^(2N-1),
// which is the exact product for every pair except (-2^(N-1))^2.
module rd_mult_se_tb;
  localparam int N  = 4;
  localparam int PW = 2 * N - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, xb = 1'b0, yb = 1'b0;
  logic p, v;
  int checks = 0, failures = 0;

  rd_mult_se #(.N(N)) dut (.clk, .rst_n, .start, .x_bit(xb), .y_bit(yb), .p_bit(p), .p_valid(v));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [N-1:0] x, y;
    logic [PW-1:0] prod;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int ix = 0; ix < (1 << N); ix++) begin
      for (int iy = 0; iy < (1 << N); iy++) begin
        x = N'(ix); y = N'(iy);
        prod = PW'($signed(x) * $signed(y));
        for (int k = 0; k < PW; k++) begin
          @(negedge clk);
          start = (k == 0);
          xb = (k < N) ? x[k] : 1'($urandom);
          yb = (k < N) ? y[k] : 1'($urandom);
          #1;
          check(v == 1'b1, "valid");
          check(p == prod[k], $sformatf("x=%0d y=%0d P%0d", $signed(x), $signed(y), k));
        end
      end
    end
    @(negedge clk);
    start = 1'b0;
    #1;
    check(!v, "idle after last operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
