// tb_ring_counter: checks that reset gives T1, that each falling edge moves
// one state on (T1..T6, then T1 again, a period of six clocks), that the ring
// changes on the falling and not the rising edge, and that hold freezes it.
module tb_ring_counter;
  logic clk = 0, rst = 0, hold = 0;
  initial #1 rst = 1;  // a real rising edge, so every flop sees the reset
  logic [5:0] t;
  int checks = 0, failures = 0;
  int idx = 0;

  ring_counter #(.N_STATES(6)) dut (.clk(clk), .rst(rst), .hold(hold), .t(t));

  always #5 clk = ~clk;

  task automatic check(input int exp_idx, input string what);
    checks++;
    if (t !== 6'(1 << exp_idx)) begin
      failures++;
      $display("FAIL %s: t=%b expected T%0d", what, t, exp_idx + 1);
    end
  endtask

  initial begin
    #12 check(0, "reset");
    @(negedge clk) #1 rst = 0;
    #1 check(0, "still T1 after release");
    for (int i = 0; i < 40; i++) begin
      @(posedge clk) #1 check(idx, "no change on rising edge");
      hold = (i >= 30 && i < 34);
      @(negedge clk);
      if (!hold) idx = (idx + 1) % 6;
      #1 check(idx, "falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
