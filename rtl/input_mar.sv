// input_mar: memory address register with the manual address input.
//
// In run mode the MAR latches the low ADDR_W bits of the W bus on the rising
// clock edge when Lm is high (T1: the program counter's value; T4: the
// address field of the instruction) and presents them to the RAM. In program
// mode (prog high) the RAM address comes straight from the address switches,
// so that a program can be entered by hand before the run.
//
// Interface: mem_addr is the address the RAM sees; mar is the register itself.
// Timing: mar changes on the rising edge of clk; the mode multiplexer is
// combinational. rst (asynchronous, active high) clears mar. Latching the PC
// into the MAR during a run follows the SAP-1 description; the form of the
// manual input (a 2-to-1 multiplexer with switches) is this design's choice.
module input_mar #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              lm,        // load from the W bus
  input  logic [ADDR_W-1:0] bus_addr,  // low bits of the W bus
  input  logic              prog,      // 1: program mode, use switches
  input  logic [ADDR_W-1:0] sw_addr,   // address switches
  output logic [ADDR_W-1:0] mar,
  output logic [ADDR_W-1:0] mem_addr
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     mar <= '0;
    else if (lm) mar <= bus_addr;
  end

  always_comb mem_addr = prog ? sw_addr : mar;

endmodule
