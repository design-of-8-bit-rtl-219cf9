// ring_counter: generates the six T-states of the SAP-1 instruction cycle.
//
// A one-hot ring of N_STATES flip-flops. Reset puts the single 1 in T1; each
// falling edge of clk moves it one place on, and after the last state (T6) it
// returns to T1, so every instruction takes exactly six clock cycles: T1..T3
// fetch, T4..T6 execute. Advancing on the falling edge gives the control word
// half a clock period to settle before the registers act on the next rising
// edge. While hold is high (the machine has halted) the ring stays where it is.
//
// Timing: state changes on the falling edge; rst is asynchronous, active high.
// Release rst while clk is low (just after a falling edge) so that the first rising
// edge after reset executes T1. The falling-edge ring of six states follows
// the SAP-1 description; the hold input is this design's way of stopping.
module ring_counter #(
  parameter int unsigned N_STATES = 6
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                hold,
  output logic [N_STATES-1:0] t      // one-hot, bit 0 = T1
);

  always_ff @(negedge clk or posedge rst) begin
    if (rst)        t <= N_STATES'(1);
    else if (!hold) t <= {t[N_STATES-2:0], t[N_STATES-1]};
  end

endmodule
