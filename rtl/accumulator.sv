// accumulator: the 8-bit working register of the SAP-1.
//
// Loaded from the W bus on the rising clock edge when La is high: with a
// memory word by LDA (T5) and with the adder-subtracter's result by ADD and
// SUB (T6). Its output always feeds operand A of the adder-subtracter, and the
// controller's Ea puts it on the W bus for OUT (T4); the bus driver itself is
// in w_bus. rst clears it to 0, a choice of this design.
module accumulator #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst,   // asynchronous, active high: clear to 0
  input  logic              la,    // load from the W bus
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (la) q <= d;
  end

endmodule
