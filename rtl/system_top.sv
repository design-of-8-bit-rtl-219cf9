// system_top: the two designs of this collection side by side.
//
// sap1_top is the SAP-1 8-bit computer; meter_top is the digital frequency
// and time-period meter. They share nothing but the reset; each has its own
// clock and its own ports, brought out here unchanged (SAP-1 ports prefixed
// cpu_, meter ports prefixed meter_). See the two modules for their use.
module system_top
  import sap1_pkg::*;
  import meter_pkg::*;
(
  input  logic                    rst,
  // SAP-1 computer
  input  logic                    cpu_clk,
  input  logic                    cpu_prog,
  input  logic                    cpu_prog_we,
  input  logic [sap1_pkg::ADDR_W-1:0] cpu_sw_addr,
  input  logic [DATA_W-1:0]       cpu_sw_data,
  output logic [DATA_W-1:0]       cpu_leds,
  output logic                    cpu_halted,
  output logic [N_TSTATE-1:0]     cpu_tstate,
  // frequency / time-period meter
  input  logic                    meter_clk,
  input  logic                    meter_sig_in,
  input  logic                    meter_btn_mode,
  output meter_mode_e             meter_mode,
  output logic [N_DIGITS-1:0][6:0] meter_seg,
  output logic [FREQ_W-1:0]       meter_freq_hz,
  output logic [TIME_W-1:0]       meter_period_us,
  output logic [TIME_W-1:0]       meter_t_on_us,
  output logic [TIME_W-1:0]       meter_t_off_us,
  output logic                    meter_freq_ovr,
  output logic                    meter_period_ovr,
  output logic                    meter_t_on_ovr,
  output logic                    meter_t_off_ovr
);

  sap1_top u_cpu (
    .clk(cpu_clk), .rst(rst), .prog(cpu_prog), .prog_we(cpu_prog_we),
    .sw_addr(cpu_sw_addr), .sw_data(cpu_sw_data), .leds(cpu_leds),
    .halted(cpu_halted), .tstate(cpu_tstate)
  );

  meter_top u_meter (
    .clk(meter_clk), .rst(rst), .sig_in(meter_sig_in), .btn_mode(meter_btn_mode),
    .mode(meter_mode), .seg(meter_seg), .freq_hz(meter_freq_hz),
    .period_us(meter_period_us), .t_on_us(meter_t_on_us), .t_off_us(meter_t_off_us),
    .freq_ovr(meter_freq_ovr), .period_ovr(meter_period_ovr),
    .t_on_ovr(meter_t_on_ovr), .t_off_ovr(meter_t_off_ovr)
  );

endmodule
