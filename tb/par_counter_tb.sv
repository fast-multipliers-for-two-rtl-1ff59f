// Self-checking testbench for par_counter: the (6;3) counter of the summers and
// the (10;4) counter of the counter-flow summer are checked exhaustively
// against a bit-by-bit count done in the testbench.
module par_counter_tb;
  logic clk = 1'b0;
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

  logic [5:0] i6;
  logic [2:0] c6;
  logic [9:0] i10;
  logic [3:0] c10;

  par_counter #(.N_IN(6))  u6  (.in_bits(i6),  .count(c6));
  par_counter #(.N_IN(10)) u10 (.in_bits(i10), .count(c10));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    finish_tb();
  end

  initial begin
    int n;
    for (int v = 0; v < 64; v++) begin
      i6 = 6'(v);
      #1;
      n = 0;
      for (int b = 0; b < 6; b++) if (v & (1 << b)) n++;
      check(int'(c6) == n, $sformatf("(6;3) in=%b count=%0d", i6, c6));
    end
    for (int v = 0; v < 1024; v++) begin
      i10 = 10'(v);
      #1;
      n = 0;
      for (int b = 0; b < 10; b++) if (v & (1 << b)) n++;
      check(int'(c10) == n, $sformatf("(10;4) in=%b count=%0d", i10, c10));
    end
    finish_tb();
  end
endmodule
