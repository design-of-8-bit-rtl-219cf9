// tb_input_mar: checks that the MAR loads the bus address only when lm is
// high, holds otherwise, and that the RAM address comes from the switches in
// program mode and from the MAR in run mode.
module tb_input_mar;
  logic clk = 0, rst = 0, lm = 0, prog = 0;
  initial #1 rst = 1;  // a real rising edge, so every flop sees the reset
  logic [3:0] bus_addr = 0, sw_addr = 0, mar, mem_addr;
  logic [3:0] model = 0;
  int checks = 0, failures = 0;

  input_mar #(.ADDR_W(4)) dut (.clk(clk), .rst(rst), .lm(lm), .bus_addr(bus_addr),
    .prog(prog), .sw_addr(sw_addr), .mar(mar), .mem_addr(mem_addr));

  always #5 clk = ~clk;

  task automatic check(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #12 check(mar, 4'd0, "reset");
    @(negedge clk) #1 rst = 0;
    for (int i = 0; i < 80; i++) begin
      lm       = $urandom_range(0, 1) == 1;
      prog     = $urandom_range(0, 3) == 0;
      bus_addr = 4'($urandom);
      sw_addr  = 4'($urandom);
      #1 check(mem_addr, prog ? sw_addr : model, "address mux");
      @(posedge clk);
      if (lm) model = bus_addr;
      #1 check(mar, model, "mar");
      @(negedge clk);
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
