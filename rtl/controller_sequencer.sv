// controller_sequencer: produces the control word for every T-state.
//
// The ring counter gives the T-state (T1..T6); an instruction decoder and a
// control matrix turn the T-state and the opcode in the IR into the 12-bit
// control word that tells each register what to do at the next rising clock
// edge:
//
//   T1  Ep Lm       PC -> MAR                   (fetch, all instructions)
//   T2  Cp          PC + 1
//   T3  CE Li       RAM[MAR] -> IR
//   T4  LDA/ADD/SUB: Ei Lm   IR address -> MAR
//       OUT:         Ea Lo   A -> output register
//   T5  LDA:         CE La   RAM[MAR] -> A
//       ADD/SUB:     CE Lb   RAM[MAR] -> B
//   T6  ADD:         Eu La   A + B -> A
//       SUB:         Su Eu La  A - B -> A
//
// States an instruction does not need give an all-zero word (no operation).
// HLT stops the machine: at the rising edge of its T4 the halted flag is set,
// the ring counter is held, and the control word stays all zero until reset.
// Opcodes outside the instruction set execute as no-operations.
//
// The six T-states, the opcodes and a 12-bit control word follow the SAP-1
// description; the micro-operations per state follow the classic SAP-1
// machine, and active-high control bits, the halted flag and the treatment of
// unknown opcodes are this design's choices.
module controller_sequencer
  import sap1_pkg::*;
(
  input  logic                clk,
  input  logic                rst,      // asynchronous, active high
  input  logic [OPCODE_W-1:0] opcode,   // from the instruction register
  output ctrl_word_t          cw,
  output tstate_t             t,
  output logic                halted
);

  ring_counter #(.N_STATES(N_TSTATE)) u_ring (
    .clk  (clk),
    .rst  (rst),
    .hold (halted),
    .t    (t)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                                      halted <= 1'b0;
    else if (t == T4 && opcode == OP_HLT)         halted <= 1'b1;
  end

  always_comb begin
    cw = CTRL_NOP;
    if (!halted) begin
      unique case (t)
        T1: begin cw.ep = 1'b1; cw.lm = 1'b1; end
        T2: begin cw.cp = 1'b1; end
        T3: begin cw.ce = 1'b1; cw.li = 1'b1; end
        T4: begin
          case (opcode)
            OP_LDA, OP_ADD, OP_SUB: begin cw.ei = 1'b1; cw.lm = 1'b1; end
            OP_OUT:                 begin cw.ea = 1'b1; cw.lo = 1'b1; end
            default: ;
          endcase
        end
        T5: begin
          case (opcode)
            OP_LDA:         begin cw.ce = 1'b1; cw.la = 1'b1; end
            OP_ADD, OP_SUB: begin cw.ce = 1'b1; cw.lb = 1'b1; end
            default: ;
          endcase
        end
        T6: begin
          case (opcode)
            OP_ADD: begin cw.eu = 1'b1; cw.la = 1'b1; end
            OP_SUB: begin cw.su = 1'b1; cw.eu = 1'b1; cw.la = 1'b1; end
            default: ;
          endcase
        end
        default: ;
      endcase
    end
  end

  // The W bus has a single driver in every T-state.
  a_one_bus_driver: assert property (@(posedge clk) disable iff (rst)
    $onehot0({cw.ep, cw.ce, cw.ei, cw.ea, cw.eu}));

  // The ring counter is always one-hot.
  a_tstate_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(t));

endmodule
