// tb_meter_ranges: the meter at the ends of its measuring ranges.
//
// The time scale is chosen so that the range ends fall on whole clocks: one
// "second" is 19800 clocks and one tick 20 clocks, so full scale is 990 ticks
// and a 99 Hz signal has a period of exactly 200 clocks. Cases:
//   1 Hz with the shortest high time (1 tick): frequency 1, T_ON 1 tick,
//     period 990 ticks (full scale, not over range), T_OFF 989 ticks;
//   99 Hz (top of the frequency range), 50 % duty: frequency 99, period 10;
//   a period just over full scale (1000 ticks): period and T_OFF over range,
//     T_ON still measured.
module tb_meter_ranges;
  import meter_pkg::*;
  localparam int SEC = 19800;     // clocks per second at this scale
  localparam int TCK = 20;        // clocks per tick
  logic clk = 0, rst = 0, sig = 0, btn = 0;
  initial #1 rst = 1;  // a real rising edge, so every flop sees the reset
  meter_mode_e mode;
  logic [6:0][6:0] seg;
  logic [6:0] freq_hz;
  logic [19:0] period_us, t_on_us, t_off_us;
  logic freq_ovr, period_ovr, t_on_ovr, t_off_ovr;
  int checks = 0, failures = 0;
  int gen_per = 0, gen_high = 0;

  meter_top #(.P_CLK_HZ(SEC), .P_TICK_HZ(SEC / TCK), .P_MAX_TICKS(SEC / TCK), .P_MAX_HZ(99)) dut (
    .clk(clk), .rst(rst), .sig_in(sig), .btn_mode(btn), .mode(mode), .seg(seg),
    .freq_hz(freq_hz), .period_us(period_us), .t_on_us(t_on_us), .t_off_us(t_off_us),
    .freq_ovr(freq_ovr), .period_ovr(period_ovr), .t_on_ovr(t_on_ovr), .t_off_ovr(t_off_ovr));

  always #5 clk = ~clk;

  initial begin
    #3;
    forever begin
      if (gen_per == 0) begin sig = 0; #10; end
      else begin
        sig = 1; #(10 * gen_high);
        sig = 0; #(10 * (gen_per - gen_high));
      end
    end
  end

  task automatic near(input int got, input int exp, input string what);
    checks++;
    if (got < exp - 1 || got > exp + 1) begin
      failures++;
      $display("FAIL %s: %0d expected %0d +/- 1", what, got, exp);
    end
  endtask

  task automatic flag(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %b", what, got); end
  endtask

  initial begin
    #12 @(negedge clk) #1 rst = 0;

    // 1 Hz, shortest high time
    gen_per = SEC; gen_high = TCK;
    repeat (3 * SEC + 100) @(posedge clk);
    near(int'(freq_hz), 1, "1 Hz frequency");
    flag(freq_ovr, 0, "1 Hz frequency over range");
    checks++;
    if (t_on_us < 1 || t_on_us > 2) begin failures++; $display("FAIL shortest T_ON %0d", t_on_us); end
    near(int'(period_us), SEC / TCK, "1 s period");
    flag(period_ovr, 0, "1 s period over range");
    near(int'(t_off_us), SEC / TCK - 1, "longest T_OFF");
    flag(t_off_ovr, 0, "longest T_OFF over range");

    // 99 Hz, 50 % duty
    gen_per = SEC / 99; gen_high = SEC / 198;
    repeat (2 * SEC + 100) @(posedge clk);
    near(int'(freq_hz), 99, "99 Hz frequency");
    checks++;
    if (freq_hz != 99 || freq_ovr) begin failures++; $display("FAIL 99 Hz reads %0d ovr %b", freq_hz, freq_ovr); end
    near(int'(period_us), 10, "99 Hz period");
    near(int'(t_on_us), 5, "99 Hz T_ON");

    // period just over full scale
    gen_per = 1000 * TCK; gen_high = 100 * TCK;
    repeat (3 * SEC) @(posedge clk);
    flag(period_ovr, 1, "1000-tick period over range");
    flag(t_off_ovr, 0, "900-tick T_OFF in range");
    near(int'(t_on_us), 100, "T_ON with long period");
    near(int'(t_off_us), 900, "T_OFF with long period");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * SEC) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
