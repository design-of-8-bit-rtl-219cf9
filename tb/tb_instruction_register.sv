// tb_instruction_register: checks that the IR loads only when li is high and
// splits the word into opcode (upper nibble) and operand (lower nibble).
module tb_instruction_register;
  logic clk = 0, rst = 0, li = 0;
  initial #1 rst = 1;  // a real rising edge, so every flop sees the reset
  logic [7:0] bus_in = 0, model = 0;
  logic [3:0] opcode, operand;
  int checks = 0, failures = 0;

  instruction_register #(.DATA_W(8), .OPCODE_W(4)) dut (.clk(clk), .rst(rst), .li(li),
    .bus_in(bus_in), .opcode(opcode), .operand(operand));

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (opcode !== model[7:4] || operand !== model[3:0]) begin
      failures++;
      $display("FAIL %s: %h/%h expected %h", what, opcode, operand, model);
    end
  endtask

  initial begin
    #12 check("reset");
    @(negedge clk) #1 rst = 0;
    for (int i = 0; i < 80; i++) begin
      li = $urandom_range(0, 1) == 1;
      bus_in = 8'($urandom);
      @(posedge clk);
      if (li) model = bus_in;
      #1 check("load");
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
