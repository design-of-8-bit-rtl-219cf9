// tb_accumulator: checks that the register clears on reset, loads d on the rising
// edge only when la is high and holds its value otherwise.
module tb_accumulator;
  logic clk = 0, rst = 0, la = 0;
  initial #1 rst = 1;  // a real rising edge, so every flop sees the reset
  logic [7:0] d = 0, q, model = 0;
  int checks = 0, failures = 0;

  accumulator #(.DATA_W(8)) dut (.clk(clk), .rst(rst), .la(la), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, model);
    end
  endtask

  initial begin
    #12 check("reset");
    @(negedge clk) #1 rst = 0;
    for (int i = 0; i < 80; i++) begin
      la = $urandom_range(0, 1) == 1;
      d = 8'($urandom);
      @(posedge clk);
      if (la) model = d;
      #1 check("load/hold");
      @(negedge clk);
    end
    #1 rst = 1; model = 0; #1 check("async clear");
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
