// output_register: holds what the program last sent out.
//
// An 8-bit register loaded from the W bus on the rising clock edge when Lo is
// high (T4 of OUT, with the accumulator on the bus). Its value drives the row
// of eight LEDs of the binary display and stays there until the next OUT. rst
// clears it to 0, a choice of this design.
module output_register #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst,   // asynchronous, active high: clear to 0
  input  logic              lo,    // load from the W bus
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (lo) q <= d;
  end

endmodule
