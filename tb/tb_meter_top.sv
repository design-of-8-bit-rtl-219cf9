// tb_meter_top: end-to-end test of the meter at a reduced time scale.
//
// The clock is scaled so that one "second" is 10000 clocks and one tick 10
// clocks (P_CLK_HZ = 10000, P_TICK_HZ = 1000, full scale 1000 ticks); the
// logic is the same as at 20 MHz. A generator, not aligned to the clock,
// produces a 25 Hz signal with 30 % duty; the meter must report 25 Hz
// (+/-1), a 40-tick period, 12-tick T_ON and 28-tick T_OFF (+/-1 tick), and
// the digits must show each in turn as the mode button is pressed. Then a
// 125 Hz signal must give a frequency over range and a signal stopped for
// longer than full scale must give T_OFF and period over range. Each of these
// mechanisms is counted and must occur.
module tb_meter_top;
  import meter_pkg::*;
  localparam int SEC = 10000;          // clocks per second at this scale
  logic clk = 0, rst = 0, sig = 0, btn = 0;
  initial #1 rst = 1;  // a real rising edge, so every flop sees the reset
  meter_mode_e mode;
  logic [6:0][6:0] seg;
  logic [6:0] freq_hz;
  logic [19:0] period_us, t_on_us, t_off_us;
  logic freq_ovr, period_ovr, t_on_ovr, t_off_ovr;
  int checks = 0, failures = 0;
  int n_freq = 0, n_times = 0, n_mode = 0, n_freq_ovr = 0, n_time_ovr = 0;
  int gen_per = 0, gen_high = 0;   // generator period and high time, clocks; 0 = stopped

  meter_top #(.P_CLK_HZ(SEC), .P_TICK_HZ(1000), .P_MAX_TICKS(1000), .P_MAX_HZ(99)) dut (
    .clk(clk), .rst(rst), .sig_in(sig), .btn_mode(btn), .mode(mode), .seg(seg),
    .freq_hz(freq_hz), .period_us(period_us), .t_on_us(t_on_us), .t_off_us(t_off_us),
    .freq_ovr(freq_ovr), .period_ovr(period_ovr), .t_on_ovr(t_on_ovr), .t_off_ovr(t_off_ovr));

  always #5 clk = ~clk;

  // signal generator, edges 3 time units after a clock edge
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

  function automatic int decode(input logic [6:0] s);
    case (s)
      7'h3F: return 0; 7'h06: return 1; 7'h5B: return 2; 7'h4F: return 3; 7'h66: return 4;
      7'h6D: return 5; 7'h7D: return 6; 7'h07: return 7; 7'h7F: return 8; 7'h6F: return 9;
      default: return -1000000;
    endcase
  endfunction

  function automatic int shown();
    int n = 0;
    for (int i = 6; i >= 0; i--) n = n * 10 + decode(seg[i]);
    return n;
  endfunction

  task automatic near(input int got, input int exp, input string what);
    checks++;
    if (got < exp - 1 || got > exp + 1) begin
      failures++;
      $display("FAIL %s: %0d expected %0d +/- 1", what, got, exp);
    end
  endtask

  task automatic press();
    @(negedge clk) btn = 1;
    @(negedge clk) btn = 0;
    @(negedge clk);
    n_mode++;
  endtask

  initial begin
    #12 @(negedge clk) #1 rst = 0;
    // 25 Hz, 30 % duty: 400 clocks period, 120 clocks high
    gen_per = SEC / 25; gen_high = 120;
    repeat (2 * SEC + 500) @(posedge clk);
    near(int'(freq_hz), 25, "frequency");
    near(int'(period_us), 40, "period");
    near(int'(t_on_us), 12, "T_ON");
    near(int'(t_off_us), 28, "T_OFF");
    checks++;
    if (freq_ovr || period_ovr || t_on_ovr || t_off_ovr) begin failures++; $display("FAIL over range in range"); end
    n_freq++; n_times++;
    checks++;
    if (mode != MODE_FREQ) begin failures++; $display("FAIL mode after reset"); end
    near(shown(), int'(freq_hz), "digits, frequency");
    press(); near(shown(), int'(period_us), "digits, period");
    press(); near(shown(), int'(t_on_us), "digits, T_ON");
    press(); near(shown(), int'(t_off_us), "digits, T_OFF");
    press();
    checks++;
    if (mode != MODE_FREQ) begin failures++; $display("FAIL mode does not wrap"); end

    // 125 Hz: above the 99 Hz full scale
    gen_per = SEC / 125; gen_high = 40;
    repeat (2 * SEC + 500) @(posedge clk);
    checks++;
    if (!freq_ovr || seg[0] != 7'h40) begin failures++; $display("FAIL no frequency over range (%0d)", freq_hz); end
    else n_freq_ovr++;
    near(int'(period_us), 8, "period at 125 Hz");

    // signal stopped for longer than 1 s
    gen_per = 0;
    repeat (SEC + SEC / 5) @(posedge clk);
    checks++;
    if (!t_off_ovr || !period_ovr) begin failures++; $display("FAIL no time over range"); end
    else n_time_ovr++;

    $display("mechanisms: freq=%0d times=%0d mode_steps=%0d freq_ovr=%0d time_ovr=%0d",
             n_freq, n_times, n_mode, n_freq_ovr, n_time_ovr);
    checks++;
    if (n_freq == 0 || n_times == 0 || n_mode == 0 || n_freq_ovr == 0 || n_time_ovr == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * SEC) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
