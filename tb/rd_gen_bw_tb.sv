// Self-checking testbench for rd_gen_bw. For every pair of N-bit factors the
// testbench plays the step sequence t_0 .. t_(2N-2) and checks the row and
// diagonal outputs in each cycle against the array terms worked out here:
// r[p] = x_(k-p) y_k and d[p] = x_k y_(k-p) for k < N (0 for negative indices),
// complemented at t_(N-1) except r[0]; all zero after t_(N-1). Inputs after the
// sign bit are random and must not matter.
module rd_gen_bw_tb;
  localparam int N = 4, SW = $clog2(2 * N + 1), STEPS = 2 * N - 1, WATCHDOG = 100000;
  logic clk = 1'b0, rst_n = 1'b0, active = 1'b0, clr = 1'b1, xb = 1'b0, yb = 1'b0;
  logic [SW-1:0] step = '0;
  logic [N-1:0] r;
  logic [N-1:1] d;
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
  rd_gen_bw #(.N(N)) dut (.clk, .rst_n, .active, .step, .clr, .x_bit(xb), .y_bit(yb), .r, .d);

  always #5 clk = ~clk;

  function automatic bit bitat(input logic [N-1:0] v, input int i);
    return (i >= 0 && i < N) ? v[i] : 1'b0;
  endfunction

  initial begin
    logic [N-1:0] x, y;
    bit e;
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
          for (int p = 0; p < N; p++) begin
            e = (k < N) ? (bitat(x, k - p) & y[k]) ^ (k == N - 1 && p != 0) : 1'b0;
            check(r[p] == e, $sformatf("x=%b y=%b t%0d r[%0d]", x, y, k, p));
          end
          for (int p = 1; p < N; p++) begin
            e = (k < N) ? (x[k] & bitat(y, k - p)) ^ (k == N - 1) : 1'b0;
            check(d[p] == e, $sformatf("x=%b y=%b t%0d d[%0d]", x, y, k, p));
          end
        end
      end
    finish_tb();
  end
endmodule
