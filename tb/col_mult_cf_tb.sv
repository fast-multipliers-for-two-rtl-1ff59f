// Self-checking testbench for col_mult_cf (counter-flow column generator).
// Every pair of N-bit factors is multiplied back to back. The testbench drives
// y_m in cycle 2m and x_m in cycle 2m+1 after start and checks that y_take/x_take
// ask for exactly those bits; the other cycles carry random bits that must be
// ignored. Product bit P_c is expected in cycle N + 1 + c (c = 0 .. 2N-2) and
// is compared with the signed integer product modulo 2^(2N-1); p_valid must be
// low in cycles 0 .. N. An operation takes 3N cycles.
module col_mult_cf_tb;
  localparam int N     = 4;
  localparam int PW    = 2 * N - 1;
  localparam int STEPS = 3 * N;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, xb = 1'b0, yb = 1'b0;
  logic p, v, xt, yt;
  int checks = 0, failures = 0;

  col_mult_cf #(.N(N)) dut (.clk, .rst_n, .start, .x_bit(xb), .y_bit(yb),
    .x_take(xt), .y_take(yt), .p_bit(p), .p_valid(v));

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
        for (int h = 0; h < STEPS; h++) begin
          @(negedge clk);
          start = (h == 0);
          xb = (h < 2 * N && h % 2 == 1) ? x[h/2] : 1'($urandom);
          yb = (h < 2 * N && h % 2 == 0) ? y[h/2] : 1'($urandom);
          #1;
          check(yt == (h < 2 * N && h % 2 == 0), "y_take timing");
          check(xt == (h < 2 * N && h % 2 == 1), "x_take timing");
          check(v == (h >= N + 1), $sformatf("p_valid in cycle %0d", h));
          if (h >= N + 1)
            check(p == prod[h-N-1], $sformatf("x=%0d y=%0d P%0d", $signed(x), $signed(y), h - N - 1));
        end
      end
    end
    @(negedge clk);
    start = 1'b0;
    #1;
    check(!v && !xt && !yt, "idle after last operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
