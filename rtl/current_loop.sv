// current_loop: inner loop of the power-factor-correction controller.
//
// On each update strobe it takes the current error e = iref_code - iin_code
// (ADC codes) and runs a proportional-integral compensator whose output is
// the duty cycle as a fraction with 32 fractional bits. The output and the
// integrator are both limited to D_MIN .. D_MAX (anti-windup); sat_hi and
// sat_lo report that the last update hit a limit. The duty is scaled to PWM
// steps (0 .. PERIOD), rounded to the nearest step, and registered: it
// changes one cycle after update, when valid pulses.
//
// The structure (error, gain, duty to the PWM) follows the source's two-loop
// figure, and the source names the duty-cycle limits as a feature of a real
// controller. The PI form, the gains, the limit values and the number
// formats are this design's choice.
module current_loop #(
  parameter int  BITS   = 12,
  parameter real FS_I   = 8.0,      // full scale of the current ADC, A
  parameter real KP     = 0.5,      // proportional gain, duty per A
  parameter real KI     = 3100.0,   // integral gain, duty per A per s
  parameter real TS     = 10.0e-6,  // update period, s
  parameter real D_MIN  = 0.0,      // smallest duty cycle
  parameter real D_MAX  = 0.95,     // largest duty cycle
  parameter int  PERIOD = 1000,     // PWM steps per period
  parameter int  DW     = $clog2(PERIOD + 1)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            update,
  input  logic [BITS-1:0] iref_code,
  input  logic [BITS-1:0] iin_code,
  output logic [DW-1:0]   duty,
  output logic            sat_hi,
  output logic            sat_lo,
  output logic            valid
);

  localparam int     DF    = 32;
  localparam real    LSB_I = FS_I / 2.0**BITS;
  localparam longint KP_Q  = longint'(KP * LSB_I * 2.0**DF);
  localparam longint KI_Q  = longint'(KI * TS * LSB_I * 2.0**DF);
  localparam longint DMINQ = longint'(D_MIN * 2.0**DF);
  localparam longint DMAXQ = longint'(D_MAX * 2.0**DF);

  logic signed [BITS:0] err;
  logic signed [63:0]   integ, integ_n, d_w, d_n;
  logic        [63:0]   duty_w;
  logic                 hi_n, lo_n;

  always_comb begin
    err     = $signed({1'b0, iref_code}) - $signed({1'b0, iin_code});
    integ_n = integ + KI_Q * 64'(err);
    if (integ_n > DMAXQ)      integ_n = DMAXQ;
    else if (integ_n < DMINQ) integ_n = DMINQ;
    d_w     = integ_n + KP_Q * 64'(err);
    hi_n    = (d_w > DMAXQ);
    lo_n    = (d_w < DMINQ);
    d_n     = hi_n ? DMAXQ : (lo_n ? DMINQ : d_w);
    duty_w  = unsigned'(d_n) * 64'(PERIOD) + 64'(1) * 2**(DF-1);  // rounded
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      integ  <= DMINQ;
      duty   <= '0;
      sat_hi <= 1'b0;
      sat_lo <= 1'b0;
      valid  <= 1'b0;
    end else begin
      valid <= update;
      if (update) begin
        integ  <= integ_n;
        duty   <= duty_w[DF +: DW];
        sat_hi <= hi_n;
        sat_lo <= lo_n;
      end
    end
  end

endmodule
