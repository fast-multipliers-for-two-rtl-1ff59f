// Self-checking testbench for rd_gen_se. For every pair of N-bit factors the
// step sequence t_0 .. t_(2N-2) is played and the outputs are compared in
// every cycle with the terms of the sign-extended array computed here: with
// x'_i = x_min(i,N-1) (likewise y'), r[q] = y'_k x_q for q <= k and d[q] = x'_k y_q
// for q < k, 0 otherwise. Inputs after the sign bit are random.
module rd_gen_se_tb;
  localparam int N = 4, SW = $clog2(2 * N + 1), STEPS = 2 * N - 1, WATCHDOG = 100000;
  logic clk = 1'b0, rst_n = 1'b0, active = 1'b0, clr = 1'b1, xb = 1'b0, yb = 1'b0;
  logic [SW-1:0] step = '0;
  logic [N-1:0] r;
  logic [N-2:0] d;
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
  rd_gen_se #(.N(N)) dut (.clk, .rst_n, .active, .step, .clr, .x_bit(xb), .y_bit(yb), .r, .d);

  always #5 clk = ~clk;

  initial begin
    logic [N-1:0] x, y;
    bit xk, yk, e;
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
          xk = x[(k < N) ? k : N - 1];
          yk = y[(k < N) ? k : N - 1];
          for (int q = 0; q < N; q++) begin
            e = (q <= k) ? (yk & x[q]) : 1'b0;
            check(r[q] == e, $sformatf("x=%b y=%b t%0d r[%0d]", x, y, k, q));
          end
          for (int q = 0; q < N - 1; q++) begin
            e = (q < k) ? (xk & y[q]) : 1'b0;
            check(d[q] == e, $sformatf("x=%b y=%b t%0d d[%0d]", x, y, k, q));
          end
        end
      end
    finish_tb();
  end
endmodule
