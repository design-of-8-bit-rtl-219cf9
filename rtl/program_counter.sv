// program_counter: address of the next instruction to fetch.
//
// A 4-bit binary counter that starts at 0 after reset and counts 0..15, one
// step per instruction. It advances on the rising clock edge when the
// controller raises Cp (in T2 of every instruction) and wraps from 15 back to
// 0. Its value is put on the W bus (low nibble) by the controller's Ep signal,
// which the top level does through w_bus; this module only holds the count.
//
// Timing: count changes on the rising edge of clk; rst is asynchronous and
// active high. The counting range follows the SAP-1 description; the reset
// style and the wrap after 15 are choices of this design.
module program_counter #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst,   // clear to address 0
  input  logic              cp,    // count enable
  output logic [ADDR_W-1:0] count
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     count <= '0;
    else if (cp) count <= count + 1'b1;
  end

endmodule
