// tb_program_counter: checks that the program counter clears on reset,
// counts only when cp is high, and wraps from 15 to 0. The expected count is
// kept by a separate model in the testbench.
module tb_program_counter;
  logic clk = 0, rst = 0, cp = 0;
  initial #1 rst = 1;  // a real rising edge, so every flop sees the reset
  logic [3:0] count;
  int checks = 0, failures = 0;
  int unsigned model = 0;

  program_counter #(.ADDR_W(4)) dut (.clk(clk), .rst(rst), .cp(cp), .count(count));

  always #5 clk = ~clk;

  task automatic check(input logic [3:0] exp, input string what);
    checks++;
    if (count !== exp) begin
      failures++;
      $display("FAIL %s: count=%0d expected %0d", what, count, exp);
    end
  endtask

  initial begin
    #12 check(4'd0, "reset");
    @(negedge clk) #1 rst = 0;
    for (int i = 0; i < 60; i++) begin
      cp = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (cp) model = (model + 1) % 16;
      #1 check(model[3:0], "count");
      @(negedge clk);
    end
    // asynchronous clear in mid-count
    #1 rst = 1; #1 check(4'd0, "async clear");
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
