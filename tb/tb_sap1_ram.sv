// tb_sap1_ram: writes random bytes to random addresses and checks that every
// read returns the last value written there, without waiting for a clock
// edge (asynchronous read).
module tb_sap1_ram;
  logic clk = 0, we = 0;
  logic [3:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [16];
  int checks = 0, failures = 0;

  sap1_ram #(.ADDR_W(4), .DATA_W(8)) dut (.clk(clk), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    // fill every location first
    for (int a = 0; a < 16; a++) begin
      @(negedge clk) addr = 4'(a); wdata = 8'($urandom); we = 1;
      model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      addr  = 4'($urandom);
      we    = $urandom_range(0, 2) == 0;
      wdata = 8'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        $display("FAIL read addr=%0d got %h expected %h", addr, rdata, model[addr]);
      end
      if (we) model[addr] = wdata;
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
