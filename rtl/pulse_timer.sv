// pulse_timer: measures T_ON, T_OFF and the period of a pulse train.
//
// Three counters advance on every 1 us tick: one while the signal is high,
// one while it is low, and one since the last rising edge. A falling edge
// stores and restarts the high-time counter (T_ON), a rising edge stores and
// restarts the low-time and period counters (T_OFF, period). Counters stop at
// MAX_TICKS + 1; a stored value above MAX_TICKS means over range (longer than
// 1 s). If the signal stops, the running count that has reached the limit is
// stored too, so the display shows over range instead of a stale reading.
//
// Interface: level/rise/fall from input_sync, tick from meter_timebase. Each
// result is in ticks (us) and comes with an over-range flag; valid bits rise
// after the first complete measurement of each quantity. Resolution is one
// tick (+/-1 us). The 1 us to 1 s range follows the meter's specification;
// the counter arrangement is this design's.
module pulse_timer #(
  parameter int unsigned MAX_TICKS = 1_000_000,
  parameter int unsigned TIME_W    = 20
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              tick,
  input  logic              level,
  input  logic              rise,
  input  logic              fall,
  output logic [TIME_W-1:0] t_on,
  output logic [TIME_W-1:0] t_off,
  output logic [TIME_W-1:0] period,
  output logic              t_on_ovr,
  output logic              t_off_ovr,
  output logic              period_ovr,
  output logic              t_on_valid,
  output logic              t_off_valid,
  output logic              period_valid
);

  localparam logic [TIME_W-1:0] SAT = TIME_W'(MAX_TICKS + 1);

  logic [TIME_W-1:0] on_cnt, off_cnt, per_cnt;
  logic              seen_rise;   // a rising edge has started a high phase
  logic              seen_fall;   // a falling edge has started a low phase

  function automatic logic [TIME_W-1:0] bump(input logic [TIME_W-1:0] c, input logic en);
    return (en && c != SAT) ? c + 1'b1 : c;
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      on_cnt <= '0; off_cnt <= '0; per_cnt <= '0; seen_rise <= 1'b0; seen_fall <= 1'b0;
      t_on <= '0; t_off <= '0; period <= '0;
      t_on_valid <= 1'b0; t_off_valid <= 1'b0; period_valid <= 1'b0;
    end else begin
      on_cnt  <= bump(on_cnt,  tick &  level);
      off_cnt <= bump(off_cnt, tick & ~level);
      per_cnt <= bump(per_cnt, tick);

      if (fall) begin
        if (seen_rise) begin
          t_on       <= on_cnt;
          t_on_valid <= 1'b1;
        end
        on_cnt    <= '0;
        seen_fall <= 1'b1;
      end else if (level && seen_rise && on_cnt == SAT) begin
        t_on <= SAT;  // stuck high
        t_on_valid <= 1'b1;
      end

      if (rise) begin
        if (seen_rise) begin
          period       <= per_cnt;
          period_valid <= 1'b1;
        end
        if (seen_fall) begin
          t_off       <= off_cnt;
          t_off_valid <= 1'b1;
        end
        off_cnt   <= '0;
        per_cnt   <= '0;
        seen_rise <= 1'b1;
      end else begin
        if (!level && seen_fall && off_cnt == SAT) begin
          t_off <= SAT;  // stuck low
          t_off_valid <= 1'b1;
        end
        if (seen_rise && per_cnt == SAT) begin
          period <= SAT;
          period_valid <= 1'b1;
        end
      end
    end
  end

  assign t_on_ovr   = t_on   > TIME_W'(MAX_TICKS);
  assign t_off_ovr  = t_off  > TIME_W'(MAX_TICKS);
  assign period_ovr = period > TIME_W'(MAX_TICKS);

endmodule
