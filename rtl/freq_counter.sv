// freq_counter: counts the signal's frequency over a fixed gate time.
//
// Rising edges are counted between two gate pulses from meter_timebase (one
// second apart at the default), so the count is the frequency in Hz with the
// +/-1 count, i.e. +/-1 Hz, uncertainty of any gated counter. At each gate
// pulse the count is stored and restarted; an edge that coincides with the
// gate is counted in the new window. The counter stops at MAX_HZ + 1 and a
// stored value above MAX_HZ means over range.
//
// Interface: rise from input_sync, gate from meter_timebase; freq_hz and its
// flags change one clock after each gate pulse. The 1..99 Hz range and the
// +/-1 Hz accuracy follow the meter's specification; the gated counter is
// this design's way of achieving them.
module freq_counter #(
  parameter int unsigned MAX_HZ = 99,
  parameter int unsigned FREQ_W = 7
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              gate,
  input  logic              rise,
  output logic [FREQ_W-1:0] freq_hz,
  output logic              freq_ovr,
  output logic              freq_valid
);

  localparam logic [FREQ_W-1:0] SAT = FREQ_W'(MAX_HZ + 1);

  logic [FREQ_W-1:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt        <= '0;
      freq_hz    <= '0;
      freq_valid <= 1'b0;
    end else if (gate) begin
      freq_hz    <= cnt;
      freq_valid <= 1'b1;
      cnt        <= rise ? FREQ_W'(1) : '0;
    end else if (rise && cnt != SAT) begin
      cnt <= cnt + 1'b1;
    end
  end

  assign freq_ovr = freq_hz > FREQ_W'(MAX_HZ);

endmodule
