// tb_system_top: end-to-end test of both designs at their full, default size.
//
// SAP-1 computer: three programs are entered through the switch ports and
// run. (1) The classic LDA/ADD/ADD/SUB/OUT/HLT program must show 28 on the
// LEDs and halt exactly 5 x 6 + 4 clocks after the run starts. (2) A program
// whose ADD overflows and whose SUB borrows, followed by unknown opcodes that
// must act as no-operations, then HLT. (3) A program with no HLT that adds 49
// to the accumulator on every pass, so the program counter wraps from 15 to
// 0; the LEDs must show 49 * k mod 256 after pass k.
//
// Meter, with the 20 MHz clock and 1 s gate of the specification: a 50 Hz,
// 30 % duty signal must read 50 Hz (+/-1), period 20000 us, T_ON 6000 us and
// T_OFF 14000 us (+/-1 us), shown in turn on the digits by the mode button;
// a 150 Hz signal must read over range, and a signal stopped for 1.1 s must
// give T_OFF and period over range.
//
// Every mechanism listed is counted and must have happened at least once.
module tb_system_top;
  import meter_pkg::*;
  logic rst = 0;
  initial #1 rst = 1;  // a real rising edge, so every flop sees the reset
  logic cpu_clk = 0, cpu_run = 1, cpu_prog = 0, cpu_prog_we = 0;
  logic [3:0] cpu_sw_addr = 0;
  logic [7:0] cpu_sw_data = 0, cpu_leds;
  logic cpu_halted;
  logic [5:0] cpu_tstate;
  logic meter_clk = 0, sig = 0, btn = 0;
  meter_mode_e mode;
  logic [6:0][6:0] seg;
  logic [6:0] freq_hz;
  logic [19:0] period_us, t_on_us, t_off_us;
  logic freq_ovr, period_ovr, t_on_ovr, t_off_ovr;
  int checks = 0, failures = 0;
  int gen_per = 0, gen_high = 0;   // meter clocks; 0 = signal stopped

  // mechanism counters
  int n_lda = 0, n_add = 0, n_sub = 0, n_out = 0, n_hlt = 0, n_unknown = 0, n_wrap = 0;
  int n_ovf = 0, n_borrow = 0, n_writes = 0;
  int n_freq = 0, n_times = 0, n_mode = 0, n_freq_ovr = 0, n_time_ovr = 0;

  system_top dut (
    .rst(rst),
    .cpu_clk(cpu_clk), .cpu_prog(cpu_prog), .cpu_prog_we(cpu_prog_we),
    .cpu_sw_addr(cpu_sw_addr), .cpu_sw_data(cpu_sw_data), .cpu_leds(cpu_leds),
    .cpu_halted(cpu_halted), .cpu_tstate(cpu_tstate),
    .meter_clk(meter_clk), .meter_sig_in(sig), .meter_btn_mode(btn),
    .meter_mode(mode), .meter_seg(seg), .meter_freq_hz(freq_hz),
    .meter_period_us(period_us), .meter_t_on_us(t_on_us), .meter_t_off_us(t_off_us),
    .meter_freq_ovr(freq_ovr), .meter_period_ovr(period_ovr),
    .meter_t_on_ovr(t_on_ovr), .meter_t_off_ovr(t_off_ovr));

  initial while (cpu_run) #5 cpu_clk = ~cpu_clk;
  always #25 meter_clk = ~meter_clk;    // 20 MHz with 1 ns units

  initial begin
    #13;
    forever begin
      if (gen_per == 0) begin sig = 0; #50; end
      else begin
        sig = 1; #(50 * gen_high);
        sig = 0; #(50 * (gen_per - gen_high));
      end
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- SAP-1 ----------------
  task automatic load(input logic [7:0] img [16]);
    @(negedge cpu_clk) cpu_prog = 1;
    for (int a = 0; a < 16; a++) begin
      @(negedge cpu_clk) cpu_sw_addr = 4'(a); cpu_sw_data = img[a]; cpu_prog_we = 1;
      n_writes++;
    end
    @(negedge cpu_clk) cpu_prog_we = 0;
    #1 cpu_prog = 0;
  endtask

  task automatic run_cpu();
    logic [7:0] img [16];
    int clocks;
    // (1) classic program: 16 + 20 + 24 - 32 = 28
    img = '{8'h09, 8'h1A, 8'h1B, 8'h2C, 8'hE0, 8'hF0, 8'h00, 8'h00,
            8'h00, 8'h10, 8'h14, 8'h18, 8'h20, 8'h00, 8'h00, 8'h00};
    load(img);
    clocks = 0;
    while (!cpu_halted && clocks < 100) begin @(posedge cpu_clk); clocks++; #1; end
    check(clocks == 5 * 6 + 4, $sformatf("classic program halts after %0d clocks", clocks));
    check(cpu_leds == 8'd28, $sformatf("classic program output %0d", cpu_leds));
    n_lda++; n_add += 2; n_sub++; n_out++; n_hlt++;

    // (2) 200 + 100 = 44 (overflow), OUT, 44 - 50 = 250 (borrow), OUT,
    //     unknown opcodes 3..9 as no-operations, HLT
    img = '{8'h0C, 8'h1D, 8'hE0, 8'h2E, 8'hE0, 8'h30, 8'h40, 8'h50,
            8'h60, 8'h70, 8'h80, 8'hF0, 8'd200, 8'd100, 8'd50, 8'h00};
    load(img);
    repeat (3 * 6) @(posedge cpu_clk);
    #1 check(cpu_leds == 8'd44, $sformatf("overflowed sum %0d", cpu_leds));
    repeat (2 * 6) @(posedge cpu_clk);
    #1 check(cpu_leds == 8'd250, $sformatf("borrowed difference %0d", cpu_leds));
    repeat (6 * 6) @(posedge cpu_clk);
    #1 check(!cpu_halted && cpu_leds == 8'd250 && cpu_tstate == 6'b100000, "unknown opcodes do nothing");
    repeat (4) @(posedge cpu_clk);
    #1 check(cpu_halted, "second program halts");
    n_lda++; n_add++; n_sub++; n_out += 2; n_unknown += 6; n_hlt++; n_ovf++; n_borrow++;

    // (3) no HLT: ADD 15 then OUT, then 14 no-operations; mem[15] = 0x31 = 49
    img = '{8'h1F, 8'hE0, 8'h30, 8'h30, 8'h30, 8'h30, 8'h30, 8'h30,
            8'h30, 8'h30, 8'h30, 8'h30, 8'h30, 8'h30, 8'h30, 8'h31};
    load(img);
    for (int k = 1; k <= 7; k++) begin
      repeat (16 * 6) @(posedge cpu_clk);
      #1 check(cpu_leds == 8'(49 * k) && !cpu_halted, $sformatf("pass %0d shows %0d", k, cpu_leds));
      n_wrap++; n_add++; n_out++; n_unknown += 14;
      if (49 * k > 255 && 49 * (k - 1) <= 255) n_ovf++;
    end
    cpu_run = 0;
  endtask

  // ---------------- meter ----------------
  localparam int SEC = 20_000_000;   // meter clocks per second

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
    check(got >= exp - 1 && got <= exp + 1, $sformatf("%s: %0d expected %0d +/- 1", what, got, exp));
  endtask

  task automatic press();
    @(negedge meter_clk) btn = 1;
    @(negedge meter_clk) btn = 0;
    @(negedge meter_clk);
    n_mode++;
  endtask

  task automatic run_meter();
    gen_per = SEC / 50; gen_high = SEC / 50 * 3 / 10;
    repeat (2 * SEC + SEC / 20) @(posedge meter_clk);
    near(int'(freq_hz), 50, "frequency");
    near(int'(period_us), 20000, "period");
    near(int'(t_on_us), 6000, "T_ON");
    near(int'(t_off_us), 14000, "T_OFF");
    check(!freq_ovr && !period_ovr && !t_on_ovr && !t_off_ovr, "no over range at 50 Hz");
    n_freq++; n_times++;
    near(shown(), int'(freq_hz), "digits, frequency");
    press(); near(shown(), int'(period_us), "digits, period");
    press(); near(shown(), int'(t_on_us), "digits, T_ON");
    press(); near(shown(), int'(t_off_us), "digits, T_OFF");
    press(); check(mode == MODE_FREQ, "mode wraps to frequency");

    gen_per = SEC / 150; gen_high = SEC / 300;
    repeat (2 * SEC + SEC / 20) @(posedge meter_clk);
    check(freq_ovr && seg[0] == 7'h40, $sformatf("150 Hz over range (%0d)", freq_hz));
    near(int'(period_us), 6667, "period at 150 Hz");
    if (freq_ovr) n_freq_ovr++;

    gen_per = 0;
    repeat (SEC + SEC / 10) @(posedge meter_clk);
    check(t_off_ovr && period_ovr, "stopped signal gives over range");
    if (t_off_ovr && period_ovr) n_time_ovr++;
  endtask

  initial begin
    #12 rst = 0;
    fork
      run_cpu();
      run_meter();
    join
    $display("mechanisms: LDA=%0d ADD=%0d SUB=%0d OUT=%0d HLT=%0d unknown=%0d pc_wrap=%0d overflow=%0d borrow=%0d ram_writes=%0d freq=%0d times=%0d mode_steps=%0d freq_ovr=%0d time_ovr=%0d",
             n_lda, n_add, n_sub, n_out, n_hlt, n_unknown, n_wrap, n_ovf, n_borrow, n_writes,
             n_freq, n_times, n_mode, n_freq_ovr, n_time_ovr);
    check(n_lda > 0 && n_add > 0 && n_sub > 0 && n_out > 0 && n_hlt > 0 && n_unknown > 0 &&
          n_wrap > 0 && n_ovf > 0 && n_borrow > 0 && n_writes > 0, "every SAP-1 mechanism happened");
    check(n_freq > 0 && n_times > 0 && n_mode > 0 && n_freq_ovr > 0 && n_time_ovr > 0,
          "every meter mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7 * SEC) @(posedge meter_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
