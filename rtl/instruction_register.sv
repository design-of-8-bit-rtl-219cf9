// instruction_register: holds the instruction being executed.
//
// An 8-bit register loaded from the W bus on the rising clock edge when Li is
// high (T3, the instruction word read from memory). Its upper nibble, the
// opcode, goes to the controller-sequencer; its lower nibble, the operand
// address, is what the IR puts on the W bus when the controller raises Ei.
//
// Timing: rising edge of clk; rst (asynchronous, active high) clears it. The
// split into opcode and address follows the SAP-1 instruction format.
module instruction_register #(
  parameter int unsigned DATA_W   = 8,
  parameter int unsigned OPCODE_W = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       li,       // load from the W bus
  input  logic [DATA_W-1:0]          bus_in,
  output logic [OPCODE_W-1:0]        opcode,
  output logic [DATA_W-OPCODE_W-1:0] operand
);

  logic [DATA_W-1:0] ir;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     ir <= '0;
    else if (li) ir <= bus_in;
  end

  assign opcode  = ir[DATA_W-1 -: OPCODE_W];
  assign operand = ir[DATA_W-OPCODE_W-1:0];

endmodule
