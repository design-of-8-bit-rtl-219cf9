// tb_meter_display: steps the mode button through all four readings and, for
// random values, reads the seven-segment digits back to a number using the
// standard segment patterns; the number must equal the selected reading.
// Over-range readings must show dashes and readings not yet valid blanks.
module tb_meter_display;
  import meter_pkg::*;
  logic clk = 0, rst = 0, btn = 0;
  initial #1 rst = 1;  // a real rising edge, so every flop sees the reset
  logic [19:0] vals [4];
  logic ovr [4], valid [4];
  meter_mode_e mode;
  logic [6:0][6:0] seg;
  int checks = 0, failures = 0;
  int modes_seen = 0;

  meter_display #(.VAL_W(20), .N_DIG(7)) dut (.clk(clk), .rst(rst), .btn(btn),
    .freq_hz(vals[0]), .freq_ovr(ovr[0]), .freq_valid(valid[0]),
    .period(vals[1]), .period_ovr(ovr[1]), .period_valid(valid[1]),
    .t_on(vals[2]), .t_on_ovr(ovr[2]), .t_on_valid(valid[2]),
    .t_off(vals[3]), .t_off_ovr(ovr[3]), .t_off_valid(valid[3]),
    .mode(mode), .seg(seg));

  always #5 clk = ~clk;

  function automatic int decode(input logic [6:0] s);
    case (s)
      7'h3F: return 0; 7'h06: return 1; 7'h5B: return 2; 7'h4F: return 3; 7'h66: return 4;
      7'h6D: return 5; 7'h7D: return 6; 7'h07: return 7; 7'h7F: return 8; 7'h6F: return 9;
      7'h40: return -1;  // dash
      7'h00: return -2;  // blank
      default: return -3;
    endcase
  endfunction

  task automatic check_display(input int m);
    int num, d, ok;
    num = 0; ok = 1;
    for (int i = 6; i >= 0; i--) begin
      d = decode(seg[i]);
      if (!valid[m]) ok &= (d == -2);
      else if (ovr[m]) ok &= (d == -1);
      else begin ok &= (d >= 0); num = num * 10 + d; end
    end
    if (valid[m] && !ovr[m]) ok &= (num == int'(vals[m]));
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL mode %0d value %0d ovr %b valid %b: shown %0d", m, vals[m], ovr[m], valid[m], num);
    end
  endtask

  initial begin
    for (int m = 0; m < 4; m++) begin vals[m] = 0; ovr[m] = 0; valid[m] = 0; end
    #12 @(negedge clk) #1 rst = 0;
    for (int i = 0; i < 200; i++) begin
      for (int m = 0; m < 4; m++) begin
        vals[m]  = (i % 3 == 0) ? 20'($urandom_range(0, 1000000)) : 20'($urandom_range(0, 999));
        ovr[m]   = ($urandom_range(0, 7) == 0);
        valid[m] = (i > 3) || ($urandom_range(0, 1) == 1);
      end
      if (i % 5 == 4) begin
        btn = 1;
        @(negedge clk);
        @(negedge clk) btn = 0;   // held two clocks: must step only once
        modes_seen++;
      end
      @(negedge clk);
      checks++;
      if (int'(mode) != modes_seen % 4) begin failures++; $display("FAIL mode %0d expected %0d", mode, modes_seen % 4); end
      check_display(int'(mode));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
