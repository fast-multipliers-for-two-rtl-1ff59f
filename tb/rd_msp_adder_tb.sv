// Self-checking testbench for rd_msp_adder: random carry-cell contents are
// applied and the high part is compared with the weighted sum computed here,
// sum over columns p of (m0+m1+m2)[p+1] * 2^(N-p), reduced to PW-N bits.
// Both product widths (2N-1 and 2N) are covered.
module rd_msp_adder_tb;
  localparam int N = 4, PA = 2 * N - 1, PB = 2 * N, WATCHDOG = 100000;
  logic clk = 1'b0;
  logic [PB:0] m0, m1, m2;
  logic [PA-N-1:0] ha;
  logic [PB-N-1:0] hb;
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
  rd_msp_adder #(.N(N), .PW(PA)) dut_a (.m0_nxt(m0[PA:0]), .m1_nxt(m1[PA:0]), .m2_nxt(m2[PA:0]), .hi(ha));
  rd_msp_adder #(.N(N), .PW(PB)) dut_b (.m0_nxt(m0), .m1_nxt(m1), .m2_nxt(m2), .hi(hb));

  always #5 clk = ~clk;

  initial begin
    longint sa, sb;
    for (int it = 0; it < 2000; it++) begin
      m0 = (PB+1)'($urandom); m1 = (PB+1)'($urandom); m2 = (PB+1)'($urandom);
      #1;
      sa = 0; sb = 0;
      for (int c = 0; c <= PB; c++) begin
        int p, n;
        p = c - 1;
        n = int'(m0[c]) + int'(m1[c]) + int'(m2[c]);
        if (N - p >= 0) begin
          if (c <= PA) sa += longint'(n) << (N - p);
          sb += longint'(n) << (N - p);
        end
      end
      check(ha == (PA-N)'(sa), $sformatf("2N-1 m0=%b m1=%b m2=%b hi=%b", m0, m1, m2, ha));
      check(hb == (PB-N)'(sb), $sformatf("2N m0=%b m1=%b m2=%b hi=%b", m0, m1, m2, hb));
    end
    finish_tb();
  end
endmodule
