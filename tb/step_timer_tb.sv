// Self-checking testbench for step_timer (STEPS = 7): one run with an idle gap,
// one run followed immediately by the next start, and a restart in mid-run.
// active/step/last are checked in every cycle against the expected sequence.
module step_timer_tb;
  localparam int STEPS = 7;
  localparam int SW    = 4;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic active, last;
  logic [SW-1:0] step;
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

  step_timer #(.STEPS(STEPS), .SW(SW)) dut (.clk, .rst_n, .start, .active, .step, .last);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end

  // start pattern per cycle and the step expected in that cycle (-1 = idle)
  initial begin
    int starts [$];
    int exp_step [$];
    int cur;
    // run 1, two idle cycles, run 2, run 3 back to back, run 4 restarted at step 3
    starts = '{1,0,0,0,0,0,0, 0,0, 1,0,0,0,0,0,0, 1,0,0,0,0,0,0, 1,0,0,0, 1,0,0,0,0,0,0, 0};
    cur = -1;
    foreach (starts[i]) begin
      if (starts[i]) cur = 0;
      else if (cur >= 0 && cur < STEPS - 1) cur++;
      else cur = -1;
      exp_step.push_back(cur);
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (starts[i]) begin
      @(negedge clk);
      start = starts[i][0];
      #1;
      check(active == (exp_step[i] >= 0), $sformatf("active cycle %0d", i));
      if (exp_step[i] >= 0) begin
        check(int'(step) == exp_step[i], $sformatf("step cycle %0d: %0d", i, step));
        check(last == (exp_step[i] == STEPS - 1), $sformatf("last cycle %0d", i));
      end else begin
        check(!last, $sformatf("last while idle, cycle %0d", i));
      end
    end
    finish_tb();
  end
endmodule
