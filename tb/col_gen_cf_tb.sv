// Self-checking testbench for col_gen_cf. The bits are fed as the generator
// asks (y_m in cycle 2m, x_m in cycle 2m+1, random otherwise). In cycle h the
// Y register has shifted ny = ceil(h/2) times and X nx = floor(h/2) times, so
// stage m of Y holds y'_(ny-1-m) and stage m of X holds x'_(nx-1-m), with x', y'
// sign-extended and 0 for negative indices. Every gate is checked against
// that model: the N facing pairs, the Y extension stages with the X input
// stage and the X extension stages with the Y input stage. In cycle N + 1 + c
// the gates must hold exactly the terms of array column c, and before column 0
// they must all be 0. Both are checked for every pair of factors.
module col_gen_cf_tb;
  localparam int N = 4, L = 2 * N - 1, SW = $clog2(3 * N + 1), STEPS = 3 * N, WATCHDOG = 100000;
  localparam int EY = N / 2, EX = (N - 1) / 2;
  logic clk = 1'b0, rst_n = 1'b0, active = 1'b0, clr = 1'b1, xb = 1'b0, yb = 1'b0;
  logic [SW-1:0] step = '0;
  logic xt, yt;
  logic [L-1:0] t;
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
  col_gen_cf #(.N(N)) dut (.clk, .rst_n, .active, .step, .clr, .x_bit(xb), .y_bit(yb),
    .x_take(xt), .y_take(yt), .t);

  always #5 clk = ~clk;

  function automatic bit ext(input logic [N-1:0] v, input int i);
    return (i < 0) ? 1'b0 : v[(i < N) ? i : N - 1];
  endfunction

  initial begin
    logic [N-1:0] x, y;
    int ny, nx, c, ones, want;
    bit e;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int ix = 0; ix < (1 << N); ix++)
      for (int iy = 0; iy < (1 << N); iy++) begin
        x = N'(ix); y = N'(iy);
        for (int h = 0; h < STEPS; h++) begin
          @(negedge clk);
          active = 1'b1; step = SW'(h); clr = (h == STEPS - 1);
          xb = (h < 2 * N && h % 2 == 1) ? x[h/2] : 1'($urandom);
          yb = (h < 2 * N && h % 2 == 0) ? y[h/2] : 1'($urandom);
          #1;
          ny = (h + 1) / 2; nx = h / 2;
          for (int a = 0; a < N; a++) begin
            e = ext(y, ny - 1 - a) & ext(x, nx - N + a);
            check(t[a] == e, $sformatf("x=%b y=%b h=%0d plain gate %0d", x, y, h, a));
          end
          for (int m = 0; m < EY; m++) begin
            e = ext(y, ny - 1 - N - m) & ext(x, nx - 1);
            check(t[N+m] == e, $sformatf("x=%b y=%b h=%0d Y extension gate %0d", x, y, h, m));
          end
          for (int m = 0; m < EX; m++) begin
            e = ext(x, nx - 1 - N - m) & ext(y, ny - 1);
            check(t[N+EY+m] == e, $sformatf("x=%b y=%b h=%0d X extension gate %0d", x, y, h, m));
          end
          c = h - N - 1;
          ones = $countones(t);
          if (c >= 0) begin
            want = 0;
            for (int i = 0; i <= c; i++) if (ext(x, i) && ext(y, c - i)) want++;
            check(ones == want, $sformatf("x=%b y=%b column %0d has %0d ones", x, y, c, ones));
          end else
            check(ones == 0, $sformatf("x=%b y=%b cycle %0d before column 0", x, y, h));
        end
      end
    finish_tb();
  end
endmodule
