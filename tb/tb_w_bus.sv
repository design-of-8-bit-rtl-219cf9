// tb_w_bus: drives five random source words and enables one source at a
// time (or none); the bus must carry the enabled word, or 0 when idle.
module tb_w_bus;
  logic [4:0][7:0] src;
  logic [4:0] en;
  logic [7:0] bus, exp;
  int checks = 0, failures = 0;

  w_bus #(.N_SRC(5), .WIDTH(8)) dut (.src(src), .en(en), .bus(bus));

  initial begin
    for (int i = 0; i < 300; i++) begin
      int sel;
      for (int s = 0; s < 5; s++) src[s] = 8'($urandom);
      sel = $urandom_range(0, 5);   // 5 means no driver
      en  = (sel == 5) ? 5'b0 : 5'(1 << sel);
      exp = (sel == 5) ? 8'h00 : src[sel];
      #1;
      checks++;
      if (bus !== exp) begin
        failures++;
        $display("FAIL sel=%0d bus=%h expected %h", sel, bus, exp);
      end
    end
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
