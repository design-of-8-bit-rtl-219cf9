// tb_meter_timebase: with a 20:1 prescaler and a 50-tick gate, checks that
// tick comes exactly every 20 clocks and gate exactly every 1000 clocks,
// always together with a tick.
module tb_meter_timebase;
  logic clk = 0, rst = 0, tick, gate;
  initial #1 rst = 1;  // a real rising edge, so every flop sees the reset
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1, last_gate = -1, n_tick = 0, n_gate = 0;

  meter_timebase #(.CLK_HZ(20), .TICK_HZ(1), .GATE_TICKS(50)) dut (.clk(clk), .rst(rst), .tick(tick), .gate(gate));

  always #5 clk = ~clk;

  initial begin
    #12 @(negedge clk) #1 rst = 0;
    repeat (5200) begin
      @(posedge clk);
      cyc++;
      #1;
      if (tick) begin
        if (last_tick >= 0) begin
          checks++;
          if (cyc - last_tick != 20) begin failures++; $display("FAIL tick spacing %0d", cyc - last_tick); end
        end
        last_tick = cyc; n_tick++;
      end
      if (gate) begin
        checks++;
        if (!tick) begin failures++; $display("FAIL gate without tick"); end
        if (last_gate >= 0) begin
          checks++;
          if (cyc - last_gate != 1000) begin failures++; $display("FAIL gate spacing %0d", cyc - last_gate); end
        end
        last_gate = cyc; n_gate++;
      end
    end
    checks++;
    if (n_tick != 260 || n_gate != 5) begin failures++; $display("FAIL counts tick=%0d gate=%0d", n_tick, n_gate); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
