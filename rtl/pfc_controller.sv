// pfc_controller: two-loop power-factor-correction controller for a boost
// converter, the digital controller that the converter model is built to
// exercise.
//
// The voltage loop turns the output-voltage error into the conductance G_in
// and multiplies it by the line voltage to get the input-current reference;
// the current loop turns the current error into a duty cycle; the PWM turns
// the duty cycle into the switch gate. The PWM's sample strobe (centre of the
// switching period) is brought out to trigger the ADCs. One cycle later,
// when the new codes are present, the voltage loop updates; the current loop
// updates the cycle after that, and its duty is taken by the PWM at the end
// of the period. The controller therefore acts on each sample one switching
// period later.
//
// The two-loop structure follows the source; the compensator form, gains and
// this update sequence are this design's choice.
module pfc_controller #(
  parameter int  BITS   = 12,
  parameter real FS_V   = 512.0,
  parameter real FS_I   = 8.0,
  parameter real F_SW   = 100.0e3,
  parameter real DT     = 10.0e-9,
  parameter int  PERIOD = int'(1.0 / (F_SW * DT)),
  parameter int  DW     = $clog2(PERIOD + 1)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [BITS-1:0]    vref_code,
  input  logic [BITS-1:0]    vout_code,
  input  logic [BITS-1:0]    vg_code,
  input  logic [BITS-1:0]    iin_code,
  output logic               gate,
  output logic               sample,
  output logic [DW-1:0]      duty,
  output logic signed [63:0] g_in,
  output logic [BITS-1:0]    iref_code,
  output logic               sat_hi,
  output logic               sat_lo
);

  localparam real TS = 1.0 / F_SW;

  logic upd_v, upd_i, unused_ivalid;
  logic period_end;
  logic [DW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) upd_v <= 1'b0;
    else     upd_v <= sample;
  end

  voltage_loop #(
    .BITS(BITS), .FS_V(FS_V), .FS_I(FS_I), .TS(TS)
  ) u_vloop (
    .clk, .rst, .update(upd_v),
    .vref_code, .vout_code, .vg_code,
    .g_in, .iref_code, .valid(upd_i)
  );

  current_loop #(
    .BITS(BITS), .FS_I(FS_I), .TS(TS), .PERIOD(PERIOD), .DW(DW)
  ) u_iloop (
    .clk, .rst, .update(upd_i),
    .iref_code, .iin_code,
    .duty, .sat_hi, .sat_lo, .valid(unused_ivalid)
  );

  pwm #(
    .F_SW(F_SW), .DT(DT), .PERIOD(PERIOD), .DW(DW)
  ) u_pwm (
    .clk, .rst, .duty,
    .gate, .sample, .period_end, .count
  );

endmodule
