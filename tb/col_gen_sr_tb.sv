// Self-checking testbench for col_gen_sr. For every pair of N-bit factors the
// steps t_0 .. t_(2N-1) are played and the column terms are compared in every
// cycle with the terms computed here: t[s] = x'_(k-s) y_s for s < N-1 and
// t[N-1] = NOT(x'_(k-N+1) y_(N-1)), where x'_i is x sign-extended (0 for i < 0)
// and y_s counts only once it has arrived (s <= k).
module col_gen_sr_tb;
  localparam int N = 4, SW = $clog2(2 * N + 1), STEPS = 2 * N, WATCHDOG = 100000;
  logic clk = 1'b0, rst_n = 1'b0, active = 1'b0, clr = 1'b1, xb = 1'b0, yb = 1'b0;
  logic [SW-1:0] step = '0;
  logic [N-1:0] t;
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
  col_gen_sr #(.N(N)) dut (.clk, .rst_n, .active, .step, .clr, .x_bit(xb), .y_bit(yb), .t);

  always #5 clk = ~clk;

  function automatic bit xext(input logic [N-1:0] v, input int i);
    return (i < 0) ? 1'b0 : v[(i < N) ? i : N - 1];
  endfunction

  initial begin
    logic [N-1:0] x, y;
    bit e, ys;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int ix = 0; ix < (1 << N); ix++)
      for (int iy = 0; iy < (1 << N); iy++) begin
        x = N'(ix); y = N'(iy);
        for (int k = 0; k < STEPS; k++) begin
          @(negedge clk);
          active = 1'b1; step = SW'(k); clr = (k == STEPS - 1);
          xb = (k < N) ? x[k] : 1'($urandom);
          yb = (k < N) ? y[k] : 1'($urandom);
          #1;
          for (int s = 0; s < N; s++) begin
            ys = (s <= k) ? y[s] : 1'b0;
            e  = xext(x, k - s) & ys;
            if (s == N - 1) e = ~e;
            check(t[s] == e, $sformatf("x=%b y=%b t%0d t[%0d]", x, y, k, s));
          end
        end
      end
    finish_tb();
  end
endmodule
