// meter_top: digital frequency and time-period meter.
//
// Measures a digital pulse train and shows, one at a time on seven-segment
// digits, its frequency (1..99 Hz, counted over a 1 s gate, +/-1 Hz), its
// period, and its high time T_ON and low time T_OFF (each from 1 us to 1 s in
// 1 us steps). The input is resynchronised (input_sync); a timebase divides
// the 20 MHz crystal clock into 1 us ticks and 1 s gates (meter_timebase); a
// gated edge counter gives the frequency (freq_counter) and tick counters
// between edges give the times (pulse_timer); meter_display selects a reading
// with the mode button and drives the digits.
//
// Interface: clk is the crystal clock, sig_in the signal under test (any
// phase), btn_mode the debounced mode button. The binary readings and their
// flags are brought out as well as the segments. Times update at each edge of
// the signal, the frequency once per gate.
//
// The ranges, resolution, accuracy and 20 MHz clock are the meter's
// specification. There the measuring is done by a microcontroller program;
// doing it in dedicated logic is this design's choice, as are the seven-digit
// readout in fixed units (Hz, us) and the absence of auto-ranging.
module meter_top
  import meter_pkg::*;
#(
  parameter int unsigned P_CLK_HZ    = CLK_HZ,
  parameter int unsigned P_TICK_HZ   = TICK_HZ,
  parameter int unsigned P_MAX_TICKS = MAX_TICKS,
  parameter int unsigned P_MAX_HZ    = MAX_HZ
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   sig_in,
  input  logic                   btn_mode,
  output meter_mode_e            mode,
  output logic [N_DIGITS-1:0][6:0] seg,
  output logic [FREQ_W-1:0]      freq_hz,
  output logic [TIME_W-1:0]      period_us,
  output logic [TIME_W-1:0]      t_on_us,
  output logic [TIME_W-1:0]      t_off_us,
  output logic                   freq_ovr,
  output logic                   period_ovr,
  output logic                   t_on_ovr,
  output logic                   t_off_ovr
);

  logic tick, gate, level, rise, fall;
  logic freq_valid, period_valid, t_on_valid, t_off_valid;

  meter_timebase #(.CLK_HZ(P_CLK_HZ), .TICK_HZ(P_TICK_HZ), .GATE_TICKS(P_TICK_HZ)) u_tb (
    .clk(clk), .rst(rst), .tick(tick), .gate(gate)
  );

  input_sync u_sync (
    .clk(clk), .rst(rst), .sig_in(sig_in), .level(level), .rise(rise), .fall(fall)
  );

  freq_counter #(.MAX_HZ(P_MAX_HZ), .FREQ_W(FREQ_W)) u_freq (
    .clk(clk), .rst(rst), .gate(gate), .rise(rise),
    .freq_hz(freq_hz), .freq_ovr(freq_ovr), .freq_valid(freq_valid)
  );

  pulse_timer #(.MAX_TICKS(P_MAX_TICKS), .TIME_W(TIME_W)) u_timer (
    .clk(clk), .rst(rst), .tick(tick), .level(level), .rise(rise), .fall(fall),
    .t_on(t_on_us), .t_off(t_off_us), .period(period_us),
    .t_on_ovr(t_on_ovr), .t_off_ovr(t_off_ovr), .period_ovr(period_ovr),
    .t_on_valid(t_on_valid), .t_off_valid(t_off_valid), .period_valid(period_valid)
  );

  meter_display #(.VAL_W(TIME_W), .N_DIG(N_DIGITS)) u_disp (
    .clk(clk), .rst(rst), .btn(btn_mode),
    .freq_hz(TIME_W'(freq_hz)), .freq_ovr(freq_ovr), .freq_valid(freq_valid),
    .period(period_us), .period_ovr(period_ovr), .period_valid(period_valid),
    .t_on(t_on_us), .t_on_ovr(t_on_ovr), .t_on_valid(t_on_valid),
    .t_off(t_off_us), .t_off_ovr(t_off_ovr), .t_off_valid(t_off_valid),
    .mode(mode), .seg(seg)
  );

endmodule
