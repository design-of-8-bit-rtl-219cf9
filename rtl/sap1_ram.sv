// sap1_ram: the 16 x 8 memory that holds both program and data.
//
// Reading is asynchronous: rdata follows addr without a clock, so the word
// addressed by the MAR is available on the W bus during the same T-state in
// which the controller raises CE. Writing is synchronous (rising edge of clk
// with we high) and is used only in program mode to enter a program from the
// data switches.
//
// The 16-byte size and the asynchronous read follow the SAP-1 description;
// the clocked write port is this design's choice for loading the memory. The
// memory is not cleared by reset.
module sap1_ram #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  always_comb rdata = mem[addr];

endmodule
