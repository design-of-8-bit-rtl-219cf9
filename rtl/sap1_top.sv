// sap1_top: the SAP-1 ("simple as possible") 8-bit computer.
//
// Ten parts share one 8-bit W bus: program counter, MAR with manual address
// input, 16 x 8 RAM, instruction register, controller-sequencer, accumulator,
// adder-subtracter, B register and output register; the output register
// drives eight LEDs (the leds port). Each instruction takes six clock cycles,
// T1..T6; the controller-sequencer changes T-state on the falling edge and the
// registers act on the rising edge, as the control word tells them.
//
// Use: with prog high the machine is held cleared and the RAM can be written,
// one byte per rising edge with prog_we high, at sw_addr with sw_data. Bring
// prog low (while clk is low) and the program runs from address 0; leds shows
// each value sent by OUT, and halted rises when HLT executes. rst is an
// asynchronous, active-high clear of the whole machine except the RAM.
//
// The blocks and their connections follow the SAP-1 architecture; program
// mode acting as a clear of the run logic is this design's choice.
module sap1_top
  import sap1_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              prog,      // 1: program mode
  input  logic              prog_we,   // write sw_data to RAM[sw_addr]
  input  logic [ADDR_W-1:0] sw_addr,
  input  logic [DATA_W-1:0] sw_data,
  output logic [DATA_W-1:0] leds,      // output register, to the binary display
  output logic              halted,
  output logic [N_TSTATE-1:0] tstate   // current T-state, one-hot (bit 0 = T1)
);

  logic                clr;            // clear of everything but the RAM
  ctrl_word_t          cw;
  logic [DATA_W-1:0]   bus;
  logic [ADDR_W-1:0]   pc, mem_addr;
  logic [DATA_W-1:0]   ram_q, acc, breg, alu;
  logic [OPCODE_W-1:0] opcode;
  logic [DATA_W-OPCODE_W-1:0] operand;
  logic [N_SRC-1:0][DATA_W-1:0] bus_src;
  logic [N_SRC-1:0]             bus_en;

  assign clr = rst | prog;

  program_counter #(.ADDR_W(ADDR_W)) u_pc (
    .clk(clk), .rst(clr), .cp(cw.cp), .count(pc)
  );

  input_mar #(.ADDR_W(ADDR_W)) u_mar (
    .clk(clk), .rst(clr), .lm(cw.lm), .bus_addr(bus[ADDR_W-1:0]),
    .prog(prog), .sw_addr(sw_addr), .mar(), .mem_addr(mem_addr)
  );

  sap1_ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ram (
    .clk(clk), .addr(mem_addr), .we(prog & prog_we), .wdata(sw_data), .rdata(ram_q)
  );

  instruction_register #(.DATA_W(DATA_W), .OPCODE_W(OPCODE_W)) u_ir (
    .clk(clk), .rst(clr), .li(cw.li), .bus_in(bus), .opcode(opcode), .operand(operand)
  );

  controller_sequencer u_ctrl (
    .clk(clk), .rst(clr), .opcode(opcode), .cw(cw), .t(tstate), .halted(halted)
  );

  accumulator #(.DATA_W(DATA_W)) u_acc (
    .clk(clk), .rst(clr), .la(cw.la), .d(bus), .q(acc)
  );

  adder_subtracter #(.DATA_W(DATA_W)) u_alu (
    .a(acc), .b(breg), .su(cw.su), .result(alu)
  );

  b_register #(.DATA_W(DATA_W)) u_b (
    .clk(clk), .rst(clr), .lb(cw.lb), .d(bus), .q(breg)
  );

  output_register #(.DATA_W(DATA_W)) u_out (
    .clk(clk), .rst(clr), .lo(cw.lo), .d(bus), .q(leds)
  );

  always_comb begin
    bus_src          = '0;
    bus_src[SRC_PC]  = DATA_W'(pc);
    bus_src[SRC_RAM] = ram_q;
    bus_src[SRC_IR]  = DATA_W'(operand);
    bus_src[SRC_ACC] = acc;
    bus_src[SRC_ALU] = alu;
    bus_en           = '0;
    bus_en[SRC_PC]   = cw.ep;
    bus_en[SRC_RAM]  = cw.ce;
    bus_en[SRC_IR]   = cw.ei;
    bus_en[SRC_ACC]  = cw.ea;
    bus_en[SRC_ALU]  = cw.eu;
  end

  w_bus #(.N_SRC(N_SRC), .WIDTH(DATA_W)) u_bus (
    .src(bus_src), .en(bus_en), .bus(bus)
  );

endmodule
