// adder_subtracter: 2's complement adder and subtracter of the SAP-1.
//
// Purely combinational: result = a + b when su is low and a - b when su is
// high, the subtraction done as a + ~b + 1 in the same adder. Results wrap
// modulo 2**DATA_W; the SAP-1 has no carry or flag register, so the carry out
// is dropped. The controller puts the result on the W bus with Eu and loads it
// into the accumulator in the same T-state (T6 of ADD and SUB).
module adder_subtracter #(
  parameter int unsigned DATA_W = 8
) (
  input  logic [DATA_W-1:0] a,       // accumulator
  input  logic [DATA_W-1:0] b,       // B register
  input  logic              su,      // 1: subtract
  output logic [DATA_W-1:0] result
);

  logic [DATA_W-1:0] b_op;

  always_comb begin
    b_op   = su ? ~b : b;
    result = a + b_op + DATA_W'(su);
  end

endmodule
