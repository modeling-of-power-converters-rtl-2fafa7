// hil_top: closed-loop hardware-in-the-loop emulation of a PFC boost
// converter: the converter model, three ADC channels and the two-loop
// controller, all stepping on one clock.
//
// Every clock cycle is one model step of DT (10 ns), so the emulation runs
// at clock-frequency / 1e8 times real time. The controller's PWM gate drives
// the model's switch; at the centre of each switching period the ADCs sample
// the rectified line voltage, the input current and the output voltage, and
// the controller acts on those codes. The rectified line voltage v_g and the
// load current i_r are inputs, so any line waveform and any load can be
// applied. vout_init sets the output voltage while rst is high; vref_code is
// the output-voltage reference in voltage-ADC codes (FS_V / 2^BITS volts per
// code; 3200 is 400 V at the defaults).
//
// The converter model and its component values follow the source; the ADC
// and controller settings are this design's choice.
module hil_top
  import hil_pkg::*;
#(
  parameter bit  LOSSES = 1'b1,
  parameter int  BITS   = 12,
  parameter real FS_V   = 512.0,
  parameter real FS_I   = 8.0,
  parameter real DT     = 10.0e-9,
  parameter real F_SW   = 100.0e3,
  parameter int  PERIOD = int'(1.0 / (F_SW * DT)),
  parameter int  DW     = $clog2(PERIOD + 1)
) (
  input  logic               clk,
  input  logic               rst,
  input  sig_t               v_g,
  input  sig_t               i_r,
  input  sig_t               vout_init,
  input  logic [BITS-1:0]    vref_code,
  output sig_t               v_out,
  output sig_t               i_in,
  output plant_state_e       state,
  output logic               gate,
  output logic               sample,
  output logic [DW-1:0]      duty,
  output logic signed [63:0] g_in,
  output logic [BITS-1:0]    iref_code,
  output logic               sat_hi,
  output logic               sat_lo,
  output logic [2:0]         adc_clipped
);

  logic [BITS-1:0] vout_code, vg_code, iin_code;
  st_t vout_s, iin_s;

  boost_plant #(.DT(DT), .LOSSES(LOSSES)) u_plant (
    .clk, .rst, .en(1'b1), .sw(gate),
    .v_g, .i_r, .vout_init,
    .v_out, .i_in, .state, .vout_s, .iin_s
  );

  adc #(.BITS(BITS), .FULL_SCALE(FS_V)) u_adc_vg (
    .clk, .rst, .sample, .x(v_g), .code(vg_code), .clipped(adc_clipped[0])
  );
  adc #(.BITS(BITS), .FULL_SCALE(FS_I)) u_adc_iin (
    .clk, .rst, .sample, .x(i_in), .code(iin_code), .clipped(adc_clipped[1])
  );
  adc #(.BITS(BITS), .FULL_SCALE(FS_V)) u_adc_vout (
    .clk, .rst, .sample, .x(v_out), .code(vout_code), .clipped(adc_clipped[2])
  );

  pfc_controller #(
    .BITS(BITS), .FS_V(FS_V), .FS_I(FS_I), .F_SW(F_SW), .DT(DT),
    .PERIOD(PERIOD), .DW(DW)
  ) u_ctrl (
    .clk, .rst,
    .vref_code, .vout_code, .vg_code, .iin_code,
    .gate, .sample, .duty, .g_in, .iref_code, .sat_hi, .sat_lo
  );

endmodule
