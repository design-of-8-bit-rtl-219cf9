// meter_display: chooses a reading and turns it into seven-segment digits.
//
// A mode register, stepped by each press of the mode button, selects what is
// shown: frequency (Hz), period, T_ON or T_OFF (all three in us). The chosen
// binary value is converted to N_DIGITS decimal digits by the shift-and-add-3
// (double dabble) method, done combinationally, and each digit is encoded for
// a seven-segment display. An over-range reading shows a dash on every digit;
// before the first measurement the digits are blank.
//
// Interface: btn is the debounced mode button, synchronous to clk; seg[i] is
// digit i (0 = least significant), bit order gfedcba, active high, meant for
// an external segment driver. mode changes one clock after a press; the
// segment outputs are combinational from the registered readings.
// Showing the four quantities on seven-segment digits with a selection button
// follows the meter's description; the digit count, the mode order and the
// encoding are this design's choices.
module meter_display
  import meter_pkg::*;
#(
  parameter int unsigned VAL_W    = 20,
  parameter int unsigned N_DIG    = 7
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              btn,
  input  logic [VAL_W-1:0]  freq_hz,
  input  logic              freq_ovr,
  input  logic              freq_valid,
  input  logic [VAL_W-1:0]  period,
  input  logic              period_ovr,
  input  logic              period_valid,
  input  logic [VAL_W-1:0]  t_on,
  input  logic              t_on_ovr,
  input  logic              t_on_valid,
  input  logic [VAL_W-1:0]  t_off,
  input  logic              t_off_ovr,
  input  logic              t_off_valid,
  output meter_mode_e       mode,
  output logic [N_DIG-1:0][6:0] seg
);

  localparam logic [6:0] SEG_DASH  = 7'b1000000;
  localparam logic [6:0] SEG_BLANK = 7'b0000000;

  logic              btn_q;
  logic [VAL_W-1:0]  value;
  logic              ovr, valid;
  logic [N_DIG-1:0][3:0] bcd;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      btn_q <= 1'b0;
      mode  <= MODE_FREQ;
    end else begin
      btn_q <= btn;
      if (btn && !btn_q) mode <= meter_mode_e'(mode + 2'd1);
    end
  end

  always_comb begin
    unique case (mode)
      MODE_FREQ:   begin value = freq_hz; ovr = freq_ovr;   valid = freq_valid;   end
      MODE_PERIOD: begin value = period;  ovr = period_ovr; valid = period_valid; end
      MODE_TON:    begin value = t_on;    ovr = t_on_ovr;   valid = t_on_valid;   end
      default:     begin value = t_off;   ovr = t_off_ovr;  valid = t_off_valid;  end
    endcase
  end

  // Double dabble: shift the value in from the top, adding 3 to every BCD
  // digit that is 5 or more before each shift.
  always_comb begin
    logic [N_DIG*4-1:0] acc;
    acc = '0;
    for (int i = VAL_W - 1; i >= 0; i--) begin
      for (int d = 0; d < N_DIG; d++) begin
        if (acc[d*4 +: 4] >= 4'd5) acc[d*4 +: 4] = acc[d*4 +: 4] + 4'd3;
      end
      acc = {acc[N_DIG*4-2:0], value[i]};
    end
    for (int d = 0; d < N_DIG; d++) bcd[d] = acc[d*4 +: 4];
  end

  function automatic logic [6:0] seven_seg(input logic [3:0] digit);
    case (digit)          // gfedcba
      4'd0:    return 7'b0111111;
      4'd1:    return 7'b0000110;
      4'd2:    return 7'b1011011;
      4'd3:    return 7'b1001111;
      4'd4:    return 7'b1100110;
      4'd5:    return 7'b1101101;
      4'd6:    return 7'b1111101;
      4'd7:    return 7'b0000111;
      4'd8:    return 7'b1111111;
      4'd9:    return 7'b1101111;
      default: return 7'b0000000;
    endcase
  endfunction

  always_comb begin
    for (int d = 0; d < N_DIG; d++) begin
      if (!valid)   seg[d] = SEG_BLANK;
      else if (ovr) seg[d] = SEG_DASH;
      else          seg[d] = seven_seg(bcd[d]);
    end
  end

endmodule
