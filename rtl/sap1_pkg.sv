// sap1_pkg: types and constants shared by the SAP-1 computer.
//
// The machine is an 8-bit accumulator computer with a 16-byte memory. An
// instruction is one byte: the upper nibble is the opcode, the lower nibble a
// memory address. The five opcodes (LDA, ADD, SUB, OUT, HLT) and their codes
// are the ones of the SAP-1 instruction set; codes not listed there do nothing.
//
// Every instruction takes six T-states, T1..T6, held one-hot: three fetch
// states and three execute states. The 12-bit control word has one bit per
// register action. Its bit order follows the classic SAP-1 control word
// (Cp Ep Lm CE Li Ei La Ea Su Eu Lb Lo); unlike the classic discrete-logic
// version every bit here is active high, which is a choice of this design.
package sap1_pkg;

  localparam int unsigned DATA_W   = 8;  // W bus, registers, memory word
  localparam int unsigned ADDR_W   = 4;  // 16-byte memory
  localparam int unsigned OPCODE_W = 4;
  localparam int unsigned N_TSTATE = 6;  // three fetch + three execute

  typedef enum logic [OPCODE_W-1:0] {
    OP_LDA = 4'b0000,
    OP_ADD = 4'b0001,
    OP_SUB = 4'b0010,
    OP_OUT = 4'b1110,
    OP_HLT = 4'b1111
  } opcode_e;

  // One-hot T-state: bit 0 is T1, bit 5 is T6.
  typedef logic [N_TSTATE-1:0] tstate_t;
  localparam tstate_t T1 = 6'b000001;
  localparam tstate_t T2 = 6'b000010;
  localparam tstate_t T3 = 6'b000100;
  localparam tstate_t T4 = 6'b001000;
  localparam tstate_t T5 = 6'b010000;
  localparam tstate_t T6 = 6'b100000;

  // 12-bit control word, most significant field first.
  typedef struct packed {
    logic cp;  // increment program counter
    logic ep;  // program counter drives the W bus
    logic lm;  // load MAR from the W bus
    logic ce;  // RAM drives the W bus
    logic li;  // load instruction register from the W bus
    logic ei;  // instruction register address field drives the W bus
    logic la;  // load accumulator from the W bus
    logic ea;  // accumulator drives the W bus
    logic su;  // adder-subtracter subtracts (else adds)
    logic eu;  // adder-subtracter drives the W bus
    logic lb;  // load B register from the W bus
    logic lo;  // load output register from the W bus
  } ctrl_word_t;

  localparam ctrl_word_t CTRL_NOP = '0;

  // Bus source indices used by w_bus in the top level.
  localparam int unsigned SRC_PC  = 0;
  localparam int unsigned SRC_RAM = 1;
  localparam int unsigned SRC_IR  = 2;
  localparam int unsigned SRC_ACC = 3;
  localparam int unsigned SRC_ALU = 4;
  localparam int unsigned N_SRC   = 5;

endpackage
