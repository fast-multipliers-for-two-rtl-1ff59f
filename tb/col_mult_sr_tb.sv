// Self-checking testbench for col_mult_sr (shift/stack column generator with
// negator, one counter). Two instances: 2N-1 and 2N bit products. First the
// worked example X = 1110 (-2), Y = 1101 (-3) is run and its serial product
// must read 0000110 (+6), LSB first in t_0 .. t_6. Then every pair of N-bit
// factors is multiplied back to back, with random bits on the inputs after the
// sign bit. Each P_k is checked in cycle t_k against the signed integer product
// modulo 2^PW.
module col_mult_sr_tb;
  localparam int N = 4, PA = 2 * N - 1, PB = 2 * N, WATCHDOG = 100000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, xb = 1'b0, yb = 1'b0;
  logic pa, va, pb, vb;
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
  col_mult_sr #(.N(N)) dut_a (.clk, .rst_n, .start, .x_bit(xb), .y_bit(yb), .p_bit(pa), .p_valid(va));
  col_mult_sr #(.N(N), .PW(PB)) dut_b (.clk, .rst_n, .start, .x_bit(xb), .y_bit(yb), .p_bit(pb), .p_valid(vb));

  always #5 clk = ~clk;

  task automatic run(input logic [N-1:0] x, input logic [N-1:0] y, output logic [PA-1:0] got);
    logic [PB-1:0] prod;
    prod = PB'($signed(x) * $signed(y));
    for (int k = 0; k < PB; k++) begin
      @(negedge clk);
      start = (k == 0);
      xb = (k < N) ? x[k] : 1'($urandom);
      yb = (k < N) ? y[k] : 1'($urandom);
      #1;
      check(vb && pb == prod[k], $sformatf("2N x=%0d y=%0d P%0d", $signed(x), $signed(y), k));
      if (k < PA) begin
        got[k] = pa;
        check(va && pa == prod[k], $sformatf("2N-1 x=%0d y=%0d P%0d", $signed(x), $signed(y), k));
      end else begin
        check(!va, "2N-1 instance idle after t_(2N-2)");
      end
    end
  endtask

  initial begin
    logic [PA-1:0] got;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(4'b1110, 4'b1101, got);
    check(got == 7'b0000110, $sformatf("worked example: %b", got));
    for (int ix = 0; ix < (1 << N); ix++)
      for (int iy = 0; iy < (1 << N); iy++) run(N'(ix), N'(iy), got);
    finish_tb();
  end
endmodule
