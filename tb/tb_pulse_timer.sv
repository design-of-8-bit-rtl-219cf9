// tb_pulse_timer: generates pulse trains with known high and low times (in
// ticks of 3 clocks) and checks T_ON, T_OFF and period to within the one-tick
// resolution; then holds the signal high and low for longer than full scale
// (MAX_TICKS = 50 ticks here) and checks the over-range flags.
module tb_pulse_timer;
  localparam int MAXT = 50;
  logic clk = 0, rst = 0, tick = 0, level = 0, prev = 0;
  initial #1 rst = 1;  // a real rising edge, so every flop sees the reset
  logic rise, fall;
  logic [19:0] t_on, t_off, period;
  logic t_on_ovr, t_off_ovr, period_ovr, t_on_valid, t_off_valid, period_valid;
  int checks = 0, failures = 0;
  int tdiv = 0;

  pulse_timer #(.MAX_TICKS(MAXT), .TIME_W(20)) dut (.clk(clk), .rst(rst), .tick(tick), .level(level),
    .rise(rise), .fall(fall), .t_on(t_on), .t_off(t_off), .period(period),
    .t_on_ovr(t_on_ovr), .t_off_ovr(t_off_ovr), .period_ovr(period_ovr),
    .t_on_valid(t_on_valid), .t_off_valid(t_off_valid), .period_valid(period_valid));

  always #5 clk = ~clk;
  assign rise = level & ~prev;
  assign fall = ~level & prev;

  always @(posedge clk) begin
    prev <= level;
    tdiv <= (tdiv == 2) ? 0 : tdiv + 1;
    tick <= (tdiv == 2);
  end

  task automatic near(input logic [19:0] got, input int exp, input string what);
    checks++;
    if (int'(got) < exp - 1 || int'(got) > exp + 1) begin
      failures++;
      $display("FAIL %s: %0d expected %0d +/- 1", what, got, exp);
    end
  endtask

  // hold the level for n ticks (3 clocks each)
  task automatic hold(input logic v, input int n);
    @(negedge clk) level = v;
    repeat (3 * n - 1) @(negedge clk);
  endtask

  initial begin
    int h, l;
    #12 @(negedge clk) #1 rst = 0;
    checks++;
    if (t_on_valid || t_off_valid || period_valid) begin failures++; $display("FAIL valid at reset"); end
    for (int k = 0; k < 12; k++) begin
      h = $urandom_range(1, 20);
      l = $urandom_range(1, 20);
      hold(1, h);
      hold(0, l);
      if (k > 0) begin
        near(t_on, h, "T_ON");
        near(period, hp + lp, "period");
        near(t_off, lp, "T_OFF (previous cycle)");
        checks++;
        if (t_on_ovr || t_off_ovr || period_ovr || !t_on_valid || !t_off_valid || !period_valid) begin
          failures++; $display("FAIL flags in range");
        end
      end
      hp = h; lp = l;
    end
    // stuck low for longer than full scale
    hold(0, MAXT + 10);
    checks++;
    if (!t_off_ovr || !period_ovr) begin failures++; $display("FAIL stuck low not over range"); end
    // stuck high for longer than full scale
    hold(1, MAXT + 10);
    checks++;
    // the low phase before it was also over range
    if (!t_on_ovr || !t_off_ovr) begin failures++; $display("FAIL stuck high: on_ovr=%b off_ovr=%b", t_on_ovr, t_off_ovr); end
    // back in range
    hold(0, 7); hold(1, 5); hold(0, 9); hold(1, 2);
    near(t_on, 5, "T_ON after over range");
    near(t_off, 9, "T_OFF after over range");
    near(period, 14, "period after over range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int hp = 0, lp = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
