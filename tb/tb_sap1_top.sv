// tb_sap1_top: runs whole programs on the SAP-1 computer and compares it,
// instruction by instruction, with an instruction-level model of the machine
// written here (fetch mem[pc], pc = pc + 1 mod 16, then LDA/ADD/SUB/OUT/HLT).
//
// Each program is entered in program mode through the switch ports, then run
// from address 0. After every instruction (six clocks) the accumulator and
// the LEDs must match the model; HLT must raise halted after exactly four
// clocks of its cycle and freeze the machine. The first program is the
// classic one (LDA 9, ADD A, ADD B, SUB C, OUT, HLT); the rest are random
// bytes, so instructions and data mix as they may in a shared memory.
//
// Mechanisms counted, each must happen at least once: every opcode, an
// unknown opcode running as a no-operation, an unused (no-operation) T-state,
// the program counter wrapping from 15 to 0, an addition that overflows,
// a subtraction that borrows, and RAM writes in program mode.
module tb_sap1_top;
  logic clk = 0, rst = 0, prog = 0, prog_we = 0;
  initial #1 rst = 1;  // a real rising edge, so every flop sees the reset
  logic [3:0] sw_addr = 0;
  logic [7:0] sw_data = 0, leds;
  logic halted;
  logic [5:0] tstate;
  int checks = 0, failures = 0;

  sap1_top dut (.clk(clk), .rst(rst), .prog(prog), .prog_we(prog_we), .sw_addr(sw_addr),
                .sw_data(sw_data), .leds(leds), .halted(halted), .tstate(tstate));

  always #5 clk = ~clk;

  // model state
  logic [7:0] mem [16];
  logic [7:0] m_acc, m_out;
  logic [3:0] m_pc;

  // mechanism counters
  int n_lda, n_add, n_sub, n_out, n_hlt, n_unknown, n_nop_states, n_wrap, n_ovf, n_borrow, n_writes;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (acc=%h leds=%h model acc=%h out=%h)", what, dut.u_acc.q, leds, m_acc, m_out);
    end
  endtask

  task automatic load_program();
    prog = 1;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      sw_addr = 4'(a); sw_data = mem[a]; prog_we = 1;
      n_writes++;
    end
    @(negedge clk) prog_we = 0;
  endtask

  // Runs up to max_instr instructions and compares each one.
  task automatic run_program(input int max_instr);
    logic [7:0] instr;
    m_acc = 0; m_out = 0; m_pc = 0;
    @(negedge clk) #1 prog = 0;
    for (int n = 0; n < max_instr; n++) begin
      instr = mem[m_pc];
      if (m_pc == 4'd15) n_wrap++;
      m_pc = m_pc + 1;
      if (instr[7:4] == 4'hF) begin
        repeat (4) @(posedge clk);
        #1 check(halted, "halted after T4 of HLT");
        n_hlt++;
        repeat (12) @(posedge clk);
        #1 check(halted && tstate == 6'b001000 && leds == m_out && dut.u_acc.q == m_acc,
                 "machine frozen after HLT");
        return;
      end
      case (instr[7:4])
        4'h0: begin m_acc = mem[instr[3:0]]; n_lda++; n_nop_states += 1; end
        4'h1: begin
          if (int'(m_acc) + int'(mem[instr[3:0]]) > 255) n_ovf++;
          m_acc = m_acc + mem[instr[3:0]]; n_add++;
        end
        4'h2: begin
          if (m_acc < mem[instr[3:0]]) n_borrow++;
          m_acc = m_acc - mem[instr[3:0]]; n_sub++;
        end
        4'hE: begin m_out = m_acc; n_out++; n_nop_states += 2; end
        default: begin n_unknown++; n_nop_states += 3; end
      endcase
      repeat (6) @(posedge clk);
      #1 check(dut.u_acc.q == m_acc && leds == m_out && !halted && tstate == 6'b100000,
               $sformatf("after instruction %0d (%h)", n, instr));
    end
  endtask

  initial begin
    n_lda = 0; n_add = 0; n_sub = 0; n_out = 0; n_hlt = 0; n_unknown = 0;
    n_nop_states = 0; n_wrap = 0; n_ovf = 0; n_borrow = 0; n_writes = 0;
    #12 @(negedge clk) #1 rst = 0;

    // classic program: 16 + 20 + 24 - 32 = 28
    mem = '{8'h09, 8'h1A, 8'h1B, 8'h2C, 8'hE0, 8'hF0, 8'h00, 8'h00,
            8'h00, 8'h10, 8'h14, 8'h18, 8'h20, 8'h00, 8'h00, 8'h00};
    load_program();
    run_program(10);
    check(leds == 8'h1C, "classic program output 28");

    // 240 + 240 overflows, 224 - 255 borrows, then unknown opcodes 5..C run
    // as no-operations until the HLT at address 13
    mem = '{8'h0D, 8'h1E, 8'hE0, 8'h2F, 8'hE0, 8'h50, 8'h60, 8'h70,
            8'h80, 8'h90, 8'hA0, 8'hB0, 8'hC0, 8'hF0, 8'hF0, 8'hFF};
    load_program();
    run_program(40);

    // random programs
    for (int p = 0; p < 60; p++) begin
      for (int a = 0; a < 16; a++) begin
        logic [3:0] op;
        case ($urandom_range(0, 9))
          0, 1:    op = 4'h0;
          2, 3:    op = 4'h1;
          4, 5:    op = 4'h2;
          6, 7:    op = 4'hE;
          8:       op = 4'hF;
          default: op = 4'($urandom);
        endcase
        mem[a] = {op, 4'($urandom)};
      end
      load_program();
      run_program(40);
    end

    $display("mechanisms: LDA=%0d ADD=%0d SUB=%0d OUT=%0d HLT=%0d unknown=%0d nop_states=%0d pc_wrap=%0d overflow=%0d borrow=%0d ram_writes=%0d",
             n_lda, n_add, n_sub, n_out, n_hlt, n_unknown, n_nop_states, n_wrap, n_ovf, n_borrow, n_writes);
    check(n_lda > 0, "LDA executed");
    check(n_add > 0, "ADD executed");
    check(n_sub > 0, "SUB executed");
    check(n_out > 0, "OUT executed");
    check(n_hlt > 0, "HLT executed");
    check(n_unknown > 0, "unknown opcode executed");
    check(n_nop_states > 0, "no-operation T-state");
    check(n_wrap > 0, "program counter wrap");
    check(n_ovf > 0, "adder overflow");
    check(n_borrow > 0, "subtraction borrow");
    check(n_writes > 0, "program-mode RAM write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
