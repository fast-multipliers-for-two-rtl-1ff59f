// Bit-time counter for one serial multiplication. A start pulse marks t_0; the
// timer then counts t_1 .. t_(STEPS-1). Outputs are combinational in the start
// cycle, so the cycle carrying start is itself t_0 (step = 0, active = 1).
// `last` flags t_(STEPS-1); the multipliers clear their state at the clock edge
// that ends it, so a new start may follow in the very next cycle. A start while
// busy restarts the count. SW (at least $clog2(STEPS+1)) sets the width of `step`.
module step_timer #(
  parameter int STEPS = 7,
  parameter int SW    = $clog2(STEPS + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       active,
  output logic [SW-1:0]              step,
  output logic                       last
);
  logic          run;
  logic [SW-1:0] cnt;

  assign active = start | run;
  assign step   = start ? '0 : cnt;
  assign last   = active && (step == SW'(STEPS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      cnt <= '0;
    end else if (active && !last) begin
      run <= 1'b1;
      cnt <= step + 1'b1;
    end else begin
      run <= 1'b0;
      cnt <= '0;
    end
  end
endmodule
