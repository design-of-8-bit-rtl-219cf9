// b_register: holds the second operand of ADD and SUB.
//
// An 8-bit register loaded from the W bus on the rising clock edge when Lb is
// high (T5 of ADD and SUB, with the addressed memory word). Its output feeds
// operand B of the adder-subtracter; it never drives the W bus. rst clears it
// to 0, a choice of this design.
module b_register #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst,   // asynchronous, active high: clear to 0
  input  logic              lb,    // load from the W bus
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (lb) q <= d;
  end

endmodule
