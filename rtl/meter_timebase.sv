// meter_timebase: time references of the meter, derived from the crystal.
//
// A prescaler divides the CLK_HZ system clock by CLK_HZ/TICK_HZ and emits a
// one-clock tick every microsecond; a second counter counts GATE_TICKS ticks
// and emits a one-clock gate pulse once a second, marking the end of each
// frequency-counting window. Both pulses are clock enables, not clocks.
//
// Timing: tick is high for one clock every CLK_HZ/TICK_HZ clocks; gate is high
// together with every GATE_TICKS-th tick. rst (asynchronous, active high)
// restarts both counters. The 20 MHz crystal, 1 us resolution and 1 s range
// are the meter's specification; the divider structure is this design's.
module meter_timebase #(
  parameter int unsigned CLK_HZ     = 20_000_000,
  parameter int unsigned TICK_HZ    = 1_000_000,
  parameter int unsigned GATE_TICKS = 1_000_000
) (
  input  logic clk,
  input  logic rst,
  output logic tick,   // 1 us enable
  output logic gate    // 1 s enable, coincides with a tick
);

  localparam int unsigned DIV  = CLK_HZ / TICK_HZ;
  localparam int unsigned PW   = (DIV > 1) ? $clog2(DIV) : 1;
  localparam int unsigned GW   = (GATE_TICKS > 1) ? $clog2(GATE_TICKS) : 1;

  logic [PW-1:0] pre;
  logic [GW-1:0] gcnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pre  <= '0;
      gcnt <= '0;
      tick <= 1'b0;
      gate <= 1'b0;
    end else begin
      tick <= 1'b0;
      gate <= 1'b0;
      if (pre == PW'(DIV - 1)) begin
        pre  <= '0;
        tick <= 1'b1;
        if (gcnt == GW'(GATE_TICKS - 1)) begin
          gcnt <= '0;
          gate <= 1'b1;
        end else begin
          gcnt <= gcnt + 1'b1;
        end
      end else begin
        pre <= pre + 1'b1;
      end
    end
  end

endmodule
