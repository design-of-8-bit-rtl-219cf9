// tb_freq_counter: with a gate every 200 clocks, drives random rising edges
// and checks that each stored count equals the number of edges in that
// window, and that counts above MAX_HZ (9 here) are flagged over range.
module tb_freq_counter;
  logic clk = 0, rst = 0, gate = 0, rise = 0;
  initial #1 rst = 1;  // a real rising edge, so every flop sees the reset
  logic [6:0] freq_hz;
  logic freq_ovr, freq_valid;
  int checks = 0, failures = 0;
  int cnt = 0, exp_cnt = 0, n_ovr = 0, n_in = 0;

  freq_counter #(.MAX_HZ(9), .FREQ_W(7)) dut (.clk(clk), .rst(rst), .gate(gate), .rise(rise),
    .freq_hz(freq_hz), .freq_ovr(freq_ovr), .freq_valid(freq_valid));

  always #5 clk = ~clk;

  initial begin
    int rate;
    #12 @(negedge clk) #1 rst = 0;
    for (int w = 0; w < 30; w++) begin
      rate = $urandom_range(2, 60);   // mean clocks between edges
      for (int c = 0; c < 200; c++) begin
        @(negedge clk);
        gate = (c == 199);
        rise = ($urandom_range(1, rate) == 1) || (c == 199 && w % 3 == 0);  // edges on the gate clock too
        @(posedge clk);
        if (gate) begin
          exp_cnt = cnt;
          cnt = rise ? 1 : 0;
        end else if (rise) cnt++;
      end
      @(negedge clk) gate = 0; rise = 0;
      checks++;
      if (!freq_valid || int'(freq_hz) != ((exp_cnt > 10) ? 10 : exp_cnt) || freq_ovr != (exp_cnt > 9)) begin
        failures++;
        $display("FAIL window %0d: freq=%0d ovr=%b expected %0d", w, freq_hz, freq_ovr, exp_cnt);
      end
      if (exp_cnt > 9) n_ovr++; else n_in++;
      cnt = cnt;  // edge in the extra clock: none (rise=0)
    end
    checks++;
    if (n_ovr == 0 || n_in == 0) begin failures++; $display("FAIL coverage ovr=%0d in=%0d", n_ovr, n_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
