// tb_input_sync: drives a random asynchronous-looking input and checks that
// level is the input delayed by two clocks and that rise and fall mark each
// edge of level for exactly one clock.
module tb_input_sync;
  logic clk = 0, rst = 0, sig_in = 0, level, rise, fall;
  initial #1 rst = 1;  // a real rising edge, so every flop sees the reset
  logic [3:0] hist = 0;   // hist[k]: input k clocks ago
  int checks = 0, failures = 0;

  input_sync dut (.clk(clk), .rst(rst), .sig_in(sig_in), .level(level), .rise(rise), .fall(fall));

  always #5 clk = ~clk;

  initial begin
    #12 @(negedge clk) #1 rst = 0;
    for (int i = 0; i < 400; i++) begin
      #2 sig_in = ($urandom_range(0, 3) == 0) ? ~sig_in : sig_in;
      @(posedge clk);
      hist = {hist[2:0], sig_in};
      #1;
      if (i >= 3) begin
        checks++;
        if (level !== hist[1] || rise !== (hist[1] & ~hist[2]) || fall !== (~hist[1] & hist[2])) begin
          failures++;
          $display("FAIL cycle %0d: level=%b rise=%b fall=%b hist=%b", i, level, rise, fall, hist);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
