// Self-checking testbench for rd_mult_bw. Two instances: the default 2N-1 bit
// product and the full-range 2N bit product. Every pair of N-bit factors is
// multiplied, operations back to back; after the sign bit the inputs carry
// random bits that the multiplier must ignore. Each product bit P_k is checked in
// its own cycle t_k on the single wire and on column output k, and the parallel
// high part is checked in cycle t_(N-1). The reference is the integer product
// of the two signed factors, reduced modulo 2^PW.
module rd_mult_bw_tb;
  localparam int N = 4;
  localparam int PW7 = 2 * N - 1;
  localparam int PW8 = 2 * N;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, xb = 1'b0, yb = 1'b0;
  logic p7, v7, hv7, p8, v8, hv8;
  logic [PW7-1:0] c7;
  logic [PW8-1:0] c8;
  logic [PW7-N-1:0] h7;
  logic [PW8-N-1:0] h8;
  int checks = 0, failures = 0, cycles = 0;

  rd_mult_bw #(.N(N)) dut7 (.clk, .rst_n, .start, .x_bit(xb), .y_bit(yb),
    .p_bit(p7), .p_valid(v7), .p_cols(c7), .p_hi(h7), .p_hi_valid(hv7));
  rd_mult_bw #(.N(N), .PW(PW8)) dut8 (.clk, .rst_n, .start, .x_bit(xb), .y_bit(yb),
    .p_bit(p8), .p_valid(v8), .p_cols(c8), .p_hi(h8), .p_hi_valid(hv8));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (200000) @(posedge clk);
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
    logic [PW8-1:0] prod;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int ix = 0; ix < (1 << N); ix++) begin
      for (int iy = 0; iy < (1 << N); iy++) begin
        x = N'(ix); y = N'(iy);
        prod = PW8'($signed(x) * $signed(y));
        // 2N cycles: the 2N-1 bit instance is done after 2N-1, so the 2N bit
        // instance sets the pace; the 2N-1 bit one sees an idle cycle.
        for (int k = 0; k < PW8; k++) begin
          @(negedge clk);
          start = (k == 0);
          xb = (k < N) ? x[k] : 1'($urandom);
          yb = (k < N) ? y[k] : 1'($urandom);
          #1;
          check(v8 == 1'b1, "valid 2N");
          check(p8 == prod[k], $sformatf("2N x=%0d y=%0d P%0d", $signed(x), $signed(y), k));
          check(c8[k] == prod[k], $sformatf("2N col %0d", k));
          if (k < PW7) begin
            check(v7 == 1'b1, "valid 2N-1");
            check(p7 == prod[k], $sformatf("2N-1 x=%0d y=%0d P%0d", $signed(x), $signed(y), k));
            check(c7[k] == prod[k], $sformatf("2N-1 col %0d", k));
          end else begin
            check(v7 == 1'b0, "2N-1 idle after its last bit");
          end
          if (k == N - 1) begin
            check(hv7 && h7 == prod[PW7-1:N], $sformatf("hi 2N-1 x=%0d y=%0d", $signed(x), $signed(y)));
            check(hv8 && h8 == prod[PW8-1:N], $sformatf("hi 2N x=%0d y=%0d", $signed(x), $signed(y)));
          end else begin
            check(!hv7 && !hv8, "hi valid only at t_(N-1)");
          end
        end
      end
    end
    @(negedge clk);
    start = 1'b0;
    #1;
    check(!v7 && !v8, "idle after last operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
