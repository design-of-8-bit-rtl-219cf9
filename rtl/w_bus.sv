// w_bus: the single shared W bus of the SAP-1.
//
// Every register that can talk puts its word on this one bus: the program
// counter, the RAM, the IR's address field, the accumulator and the
// adder-subtracter. In the discrete original these are tri-state drivers on a
// common wire; here the bus is a multiplexer that ORs the enabled sources, so
// it synthesises without internal tri-states. The controller enables at most
// one source per T-state; when none is enabled the bus reads 0. The rule of
// at most one driver is checked with an assertion where the control word is
// produced (controller_sequencer).
//
// Interface: src is a packed array of N_SRC words, en one enable per source.
// Timing: combinational.
module w_bus #(
  parameter int unsigned N_SRC = 5,
  parameter int unsigned WIDTH = 8
) (
  input  logic [N_SRC-1:0][WIDTH-1:0] src,
  input  logic [N_SRC-1:0]            en,
  output logic [WIDTH-1:0]            bus
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < N_SRC; i++) begin
      if (en[i]) bus |= src[i];
    end
  end

endmodule
