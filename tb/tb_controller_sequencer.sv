// tb_controller_sequencer: feeds opcodes to the controller as an instruction
// register would, and at every rising edge compares the 12-bit control word
// (order Cp Ep Lm CE Li Ei La Ea Su Eu Lb Lo) with a table of the SAP-1
// micro-operations written out here. Also checks that every instruction takes
// six clocks and that HLT stops the sequence for good.
module tb_controller_sequencer;
  import sap1_pkg::*;
  logic clk = 0, rst = 0;
  initial #1 rst = 1;  // a real rising edge, so every flop sees the reset
  logic [3:0] opcode = 0;
  ctrl_word_t cw;
  tstate_t t;
  logic halted;
  int checks = 0, failures = 0;

  controller_sequencer dut (.clk(clk), .rst(rst), .opcode(opcode), .cw(cw), .t(t), .halted(halted));

  always #5 clk = ~clk;

  //                            CEL CLE LES EL
  //                            ppm Eie aau ubo
  function automatic logic [11:0] expected(input logic [3:0] op, input int ts);
    case (ts)
      1: return 12'b0110_0000_0000;
      2: return 12'b1000_0000_0000;
      3: return 12'b0001_1000_0000;
      4: case (op)
           4'b0000, 4'b0001, 4'b0010: return 12'b0010_0100_0000;
           4'b1110:                   return 12'b0000_0001_0001;
           default:                   return 12'b0;
         endcase
      5: case (op)
           4'b0000:          return 12'b0001_0010_0000;
           4'b0001, 4'b0010: return 12'b0001_0000_0010;
           default:          return 12'b0;
         endcase
      6: case (op)
           4'b0001: return 12'b0000_0010_0100;
           4'b0010: return 12'b0000_0010_1100;
           default: return 12'b0;
         endcase
      default: return 12'b0;
    endcase
  endfunction

  logic [3:0] prog [10] = '{4'b0000, 4'b0001, 4'b0010, 4'b1110, 4'b0101,
                            4'b0001, 4'b1110, 4'b0010, 4'b0000, 4'b1111};
  int cycles = 0;

  initial begin
    #12;
    @(negedge clk) #1 rst = 0;
    for (int n = 0; n < 10; n++) begin
      for (int ts = 1; ts <= 6; ts++) begin
        // the IR is loaded at the end of T3; before that it holds the old opcode
        if (ts == 4) opcode = prog[n];
        @(posedge clk);
        cycles++;
        checks++;
        if (cw !== expected(opcode, ts) || t !== tstate_t'(1 << (ts - 1))) begin
          failures++;
          $display("FAIL instr %0d op %b T%0d: cw=%b t=%b expected %b", n, opcode, ts,
                   cw, t, expected(opcode, ts));
        end
        #1;
        if (prog[n] == 4'b1111 && ts == 4) break;
        @(negedge clk);
      end
      if (prog[n] == 4'b1111) break;
    end
    // nine six-cycle instructions, then T1..T4 of HLT
    checks++;
    if (cycles != 9 * 6 + 4) begin
      failures++;
      $display("FAIL cycle count %0d", cycles);
    end
    checks++;
    if (!halted) begin failures++; $display("FAIL not halted"); end
    repeat (20) begin
      @(posedge clk);
      checks++;
      if (cw !== CTRL_NOP || t !== T4) begin
        failures++;
        $display("FAIL halted machine active: cw=%b t=%b", cw, t);
      end
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
