// Self-checking testbench for rd_summer_bw, independent of the generator: the
// testbench forms the row/diagonal terms of the non-negative array itself and
// drives them, step by step, into two summers (product widths 2N-1 and 2N).
// Every product bit P_k is checked on its column output and on the single
// wire in cycle t_k, against the signed integer product modulo 2^PW.
module rd_summer_bw_tb;
  localparam int N = 4, SW = $clog2(2 * N + 1), WATCHDOG = 100000;
  localparam int PA = 2 * N - 1, PB = 2 * N;
  logic clk = 1'b0, rst_n = 1'b0;
  logic act_a = 1'b0, act_b = 1'b0, clr_a = 1'b1, clr_b = 1'b1;
  logic [SW-1:0] step = '0;
  logic [N-1:0] r = '0;
  logic [N-1:1] d = '0;
  logic [PA-1:0] ca;
  logic [PB-1:0] cb;
  logic pa, pb;
  logic [PA:0] ma0, ma1, ma2;
  logic [PB:0] mb0, mb1, mb2;
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
  rd_summer_bw #(.N(N), .PW(PA)) dut_a (.clk, .rst_n, .active(act_a), .step, .clr(clr_a), .r, .d,
    .p_cols(ca), .p_bit(pa), .m0_nxt(ma0), .m1_nxt(ma1), .m2_nxt(ma2));
  rd_summer_bw #(.N(N), .PW(PB)) dut_b (.clk, .rst_n, .active(act_b), .step, .clr(clr_b), .r, .d,
    .p_cols(cb), .p_bit(pb), .m0_nxt(mb0), .m1_nxt(mb1), .m2_nxt(mb2));

  always #5 clk = ~clk;

  function automatic bit bitat(input logic [N-1:0] v, input int i);
    return (i >= 0 && i < N) ? v[i] : 1'b0;
  endfunction

  initial begin
    logic [N-1:0] x, y;
    logic [PB-1:0] prod;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int ix = 0; ix < (1 << N); ix++)
      for (int iy = 0; iy < (1 << N); iy++) begin
        x = N'(ix); y = N'(iy);
        prod = PB'($signed(x) * $signed(y));
        for (int k = 0; k < PB; k++) begin
          @(negedge clk);
          step = SW'(k);
          act_a = (k < PA); clr_a = (k >= PA - 1);
          act_b = 1'b1;     clr_b = (k == PB - 1);
          for (int p = 0; p < N; p++)
            r[p] = (k < N) ? (bitat(x, k - p) & y[k]) ^ (k == N - 1 && p != 0) : 1'b0;
          for (int p = 1; p < N; p++)
            d[p] = (k < N) ? (x[k] & bitat(y, k - p)) ^ (k == N - 1) : 1'b0;
          #1;
          check(cb[k] == prod[k] && pb == prod[k], $sformatf("2N x=%0d y=%0d P%0d", $signed(x), $signed(y), k));
          if (k < PA)
            check(ca[k] == prod[k] && pa == prod[k], $sformatf("2N-1 x=%0d y=%0d P%0d", $signed(x), $signed(y), k));
        end
      end
    finish_tb();
  end
endmodule
