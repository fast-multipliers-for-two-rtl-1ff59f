// End-to-end testbench for serial_mult_top at its default size (N = 4). The four
// multipliers run concurrently, each through all 256 factor pairs in its own
// random order, mostly back to back and sometimes with idle cycles between
// operations. Each serial product is collected bit by bit and compared with
// the signed integer product: modulo 2^(2N-1) always, and as a signed 2N-1 bit
// number for every pair other than (-2^(N-1))^2. Multiplier a's column outputs
// and parallel high part are checked too.
// The testbench also counts how often each mechanism of the designs occurs and
// fails if one never does: sign-cycle complementing (a), carry feedback into
// the cells (a, b), sign-extended terms after the sign cycle (b), negator ones
// and initial carry (c), weight-4 feedback (c), counter-flow sampling and
// weight-4 feedback (d), back-to-back starts and idle gaps. (The weight-8
// line of d cannot carry a 1 at N = 4: counts of 8 occur only in columns 5
// and 6, whose weight-8 carry would fall beyond the 7-bit product.)
module serial_mult_top_tb;
  localparam int N = 4, PW = 2 * N - 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic a_start = 0, a_x = 0, a_y = 0, b_start = 0, b_x = 0, b_y = 0;
  logic c_start = 0, c_x = 0, c_y = 0, d_start = 0, d_x = 0, d_y = 0;
  logic a_p, a_pv, a_hv, b_p, b_pv, c_p, c_pv, d_p, d_pv, d_xt, d_yt;
  logic [2*N-2:0] a_cols;
  logic [N-2:0] a_hi;
  int checks = 0, failures = 0;
  int n_sigma_inv = 0, n_carry_a = 0, n_carry_b = 0, n_ext_b = 0, n_neg_ones = 0;
  int n_init_c1 = 0, n_w4_c = 0, n_takes_d = 0, n_w4_d = 0, n_b2b = 0, n_gap = 0;
  int n_hi = 0, n_done = 0;

  serial_mult_top dut (
    .clk, .rst_n,
    .a_start, .a_x, .a_y, .a_p, .a_p_valid(a_pv), .a_p_cols(a_cols), .a_p_hi(a_hi), .a_p_hi_valid(a_hv),
    .b_start, .b_x, .b_y, .b_p, .b_p_valid(b_pv),
    .c_start, .c_x, .c_y, .c_p, .c_p_valid(c_pv),
    .d_start, .d_x, .d_y, .d_x_take(d_xt), .d_y_take(d_yt), .d_p, .d_p_valid(d_pv)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
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

  // mechanism counters, sampled just before each rising edge
  always @(negedge clk) begin
    #2;
    if (rst_n) begin
      if (dut.u_a.u_gen.sig && (|dut.u_a.u_gen.d)) n_sigma_inv++;
      if (|{dut.u_a.u_sum.m0, dut.u_a.u_sum.m1, dut.u_a.u_sum.m2}) n_carry_a++;
      if (|{dut.u_b.u_sum.m0, dut.u_b.u_sum.m1, dut.u_b.u_sum.m2}) n_carry_b++;
      if (dut.u_b.active && dut.u_b.step >= N && (|dut.u_b.r)) n_ext_b++;
      if (dut.u_c.active && dut.u_c.step < N - 1 && dut.u_c.t[N-1]) n_neg_ones++;
      if (c_start && dut.u_c.u_sum.fb[1]) n_init_c1++;
      if (dut.u_c.active && dut.u_c.u_sum.fb[2]) n_w4_c++;
      if (d_xt || d_yt) n_takes_d++;
      if (dut.u_d.active && dut.u_d.u_sum.fb[2]) n_w4_d++;
    end
  end

  function automatic logic [PW-1:0] expect_p(input logic [N-1:0] x, input logic [N-1:0] y);
    return PW'($signed(x) * $signed(y));
  endfunction

  task automatic judge(input string who, input logic [N-1:0] x, input logic [N-1:0] y,
                       input logic [PW-1:0] got);
    int full;
    full = $signed(x) * $signed(y);
    check(got == expect_p(x, y), $sformatf("%s x=%0d y=%0d got %b", who, $signed(x), $signed(y), got));
    if (!(x == 4'b1000 && y == 4'b1000))
      check(int'($signed(got)) == full, $sformatf("%s signed x=%0d y=%0d", who, $signed(x), $signed(y)));
    n_done++;
  endtask

  task automatic shuffle(ref int order [256]);
    for (int i = 0; i < 256; i++) order[i] = i;
    for (int i = 255; i > 0; i--) begin
      int j, tmp;
      j = $urandom_range(i);
      tmp = order[i]; order[i] = order[j]; order[j] = tmp;
    end
  endtask

  // a, b and c share the same t_k timing; one driver each
  task automatic drive_abc(input int which);
    int order [256];
    logic [N-1:0] x, y;
    logic [PW-1:0] got;
    shuffle(order);
    foreach (order[n]) begin
      x = N'(order[n] >> N); y = N'(order[n]);
      if ($urandom_range(7) == 0) begin
        @(negedge clk);
        if (which == 0) n_gap++;
        case (which) 0: a_start = 0; 1: b_start = 0; default: c_start = 0; endcase
      end else if (n > 0 && which == 0) n_b2b++;
      for (int k = 0; k < PW; k++) begin
        logic s, xb, yb, pb;
        @(negedge clk);
        s = (k == 0);
        xb = (k < N) ? x[k] : 1'($urandom);
        yb = (k < N) ? y[k] : 1'($urandom);
        case (which)
          0: begin a_start = s; a_x = xb; a_y = yb; end
          1: begin b_start = s; b_x = xb; b_y = yb; end
          default: begin c_start = s; c_x = xb; c_y = yb; end
        endcase
        #1;
        case (which)
          0: begin
            pb = a_p;
            check(a_pv && a_cols[k] == a_p, "a column output equals single wire");
            if (k == N - 1) begin
              check(a_hv && a_hi == expect_p(x, y)[PW-1:N], "a parallel high part");
              n_hi++;
            end
          end
          1: begin pb = b_p; check(b_pv, "b valid"); end
          default: begin pb = c_p; check(c_pv, "c valid"); end
        endcase
        got[k] = pb;
      end
      judge(which == 0 ? "a" : (which == 1 ? "b" : "c"), x, y, got);
    end
    @(negedge clk);
    case (which) 0: a_start = 0; 1: b_start = 0; default: c_start = 0; endcase
  endtask

  task automatic drive_d();
    int order [256];
    logic [N-1:0] x, y;
    logic [PW-1:0] got;
    shuffle(order);
    foreach (order[n]) begin
      x = N'(order[n] >> N); y = N'(order[n]);
      if ($urandom_range(7) == 0) begin
        @(negedge clk);
        d_start = 0;
      end
      for (int h = 0; h < 3 * N; h++) begin
        @(negedge clk);
        d_start = (h == 0);
        d_x = (h < 2 * N && h % 2 == 1) ? x[h/2] : 1'($urandom);
        d_y = (h < 2 * N && h % 2 == 0) ? y[h/2] : 1'($urandom);
        #1;
        check(d_xt == (h < 2 * N && h % 2 == 1) && d_yt == (h < 2 * N && h % 2 == 0), "d take timing");
        check(d_pv == (h >= N + 1), "d valid timing");
        if (h >= N + 1) got[h-N-1] = d_p;
      end
      judge("d", x, y, got);
    end
    @(negedge clk);
    d_start = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      drive_abc(0);
      drive_abc(1);
      drive_abc(2);
      drive_d();
    join
    check(n_done == 4 * 256, $sformatf("operations completed: %0d", n_done));
    check(n_hi == 256, "parallel high part seen once per operation of a");
    check(n_sigma_inv > 0, "sign-cycle complementing");
    check(n_carry_a > 0, "carry feedback in a");
    check(n_carry_b > 0, "carry feedback in b");
    check(n_ext_b > 0, "sign-extended terms after the sign cycle in b");
    check(n_neg_ones > 0, "negator ones in c");
    check(n_init_c1 > 0, "initial carry in c");
    check(n_w4_c > 0, "weight-4 feedback in c");
    check(n_takes_d > 0, "counter-flow sampling in d");
    check(n_w4_d > 0, "weight-4 feedback in d");
    check(n_b2b > 0, "back-to-back operations");
    check(n_gap > 0, "idle gaps between operations");
    $display("mechanisms: sigma_inv=%0d carry_a=%0d carry_b=%0d ext_b=%0d neg_ones=%0d init_c1=%0d w4_c=%0d takes_d=%0d w4_d=%0d b2b=%0d gaps=%0d hi=%0d",
             n_sigma_inv, n_carry_a, n_carry_b, n_ext_b, n_neg_ones, n_init_c1, n_w4_c, n_takes_d, n_w4_d, n_b2b, n_gap, n_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
