// tb_adder_subtracter: compares the result with A+B and A-B modulo 256 for
// corner values and random operands, in both modes.
module tb_adder_subtracter;
  logic [7:0] a, b, result;
  logic su;
  int checks = 0, failures = 0;

  adder_subtracter #(.DATA_W(8)) dut (.a(a), .b(b), .su(su), .result(result));

  task automatic try(input logic [7:0] ta, input logic [7:0] tb, input logic tsu);
    int exp;
    a = ta; b = tb; su = tsu;
    #1;
    exp = tsu ? (int'(ta) - int'(tb)) : (int'(ta) + int'(tb));
    checks++;
    if (result !== 8'(exp)) begin
      failures++;
      $display("FAIL %0d %s %0d = %0d expected %0d", ta, tsu ? "-" : "+", tb, result, 8'(exp));
    end
  endtask

  initial begin
    try(8'd0, 8'd0, 0); try(8'd255, 8'd1, 0); try(8'd0, 8'd1, 1);
    try(8'd128, 8'd128, 0); try(8'd5, 8'd7, 1); try(8'd200, 8'd100, 1);
    for (int i = 0; i < 500; i++) try(8'($urandom), 8'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
