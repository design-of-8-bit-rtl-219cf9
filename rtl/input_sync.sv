// input_sync: brings the measured signal into the meter's clock domain.
//
// Two flip-flops resynchronise the asynchronous input; a third keeps the
// previous synchronised value so that single-clock rise and fall pulses can
// be formed. The synchroniser adds two clocks of latency (100 ns at 20 MHz),
// the same on both edges, so it does not bias any time measurement.
//
// Interface: level is the synchronised signal, rise/fall are high for one
// clock after each edge. rst (asynchronous, active high) clears all stages.
// This stage is this design's choice; the specification leaves signal entry to the
// microcontroller.
module input_sync (
  input  logic clk,
  input  logic rst,
  input  logic sig_in,
  output logic level,
  output logic rise,
  output logic fall
);

  logic meta, prev;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      meta  <= 1'b0;
      level <= 1'b0;
      prev  <= 1'b0;
    end else begin
      meta  <= sig_in;
      level <= meta;
      prev  <= level;
    end
  end

  assign rise = level & ~prev;
  assign fall = ~level & prev;

endmodule
