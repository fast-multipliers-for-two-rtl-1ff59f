// Self-checking testbench for col_summer, as used by both column multipliers:
// T=4, CW=3 with initial carry 1, and T=7, CW=4 without. Random term vectors
// are applied for runs of 2N cycles; the output bit of cycle k must equal bit k
// of C1_INIT + sum over cycles i <= k of popcount(terms_i) * 2^i, computed here.
// The summers are cleared between runs.
module col_summer_tb;
  localparam int RUN = 8, WATCHDOG = 100000;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b1;
  logic [3:0] ta = '0;
  logic [6:0] tb_ = '0;
  logic pa, pb;
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
  col_summer #(.T(4), .CW(3), .C1_INIT(1'b1)) dut_a (.clk, .rst_n, .clr, .terms(ta), .p_bit(pa));
  col_summer #(.T(7), .CW(4), .C1_INIT(1'b0)) dut_b (.clk, .rst_n, .clr, .terms(tb_), .p_bit(pb));

  always #5 clk = ~clk;

  initial begin
    longint sa, sb;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 500; run++) begin
      sa = 1; sb = 0;
      for (int k = 0; k < RUN; k++) begin
        @(negedge clk);
        clr = (k == RUN - 1);
        // dense runs now and then, to reach the largest counts
        ta  = (run % 4 == 0) ? 4'hF  : 4'($urandom);
        tb_ = (run % 4 == 0) ? 7'h7F : 7'($urandom);
        sa += longint'($countones(ta)) << k;
        sb += longint'($countones(tb_)) << k;
        #1;
        check(pa == sa[k], $sformatf("T=4 run %0d cycle %0d", run, k));
        check(pb == sb[k], $sformatf("T=7 run %0d cycle %0d", run, k));
      end
    end
    finish_tb();
  end
endmodule
