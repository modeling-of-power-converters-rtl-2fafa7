// voltage_loop: outer loop of the power-factor-correction controller.
//
// On each update strobe it takes the output-voltage error e = vref_code -
// vout_code (ADC codes) and runs a proportional-integral compensator whose
// output is the input conductance G_in (siemens), limited to 0 .. G_MAX with
// the integrator held inside the same range (anti-windup). It then multiplies
// G_in by the rectified line voltage to form the input-current reference,
//   i_ref = G_in * v_g,   so the input current follows the line voltage.
// G_in is a signed number with GF = 48 fractional bits; iref_code is in the
// code units of the current ADC (full scale FS_I) and saturates at its top
// code. Both are registered: they change one cycle after update, and valid
// pulses in that cycle.
//
// The structure (error, gain, G_in, multiplier producing the current
// reference) follows the source's two-loop figure and its use of G_in. The PI
// form, the gains, the limits and the number formats are this design's
// choice: the source only names the gain block.
module voltage_loop #(
  parameter int  BITS  = 12,
  parameter real FS_V  = 512.0,     // full scale of the voltage ADCs, V
  parameter real FS_I  = 8.0,       // full scale of the current ADC, A
  parameter real KP    = 4.75e-5,   // proportional gain, S per V
  parameter real KI    = 3.0e-3,    // integral gain, S per V per s
  parameter real TS    = 10.0e-6,   // update period, s
  parameter real G_MAX = 0.05       // conductance limit, S
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            update,
  input  logic [BITS-1:0] vref_code,
  input  logic [BITS-1:0] vout_code,
  input  logic [BITS-1:0] vg_code,
  output logic signed [63:0] g_in,
  output logic [BITS-1:0] iref_code,
  output logic            valid
);

  localparam int     GF    = 48;
  localparam real    LSB_V = FS_V / 2.0**BITS;
  localparam longint KP_Q  = longint'(KP * LSB_V * 2.0**GF);
  localparam longint KI_Q  = longint'(KI * TS * LSB_V * 2.0**GF);
  localparam longint GMAXQ = longint'(G_MAX * 2.0**GF);
  localparam int     KVI_F = 16;
  localparam longint KVI   = longint'(FS_V / FS_I * 2.0**KVI_F);

  logic signed [BITS:0]  err;
  logic signed [79:0]    integ_w, g_w;
  logic signed [63:0]    integ, integ_n, g_n;
  logic        [127:0]   iref_w;
  logic        [BITS-1:0] iref_n;

  function automatic logic signed [63:0] clamp_g(logic signed [79:0] v);
    if (v < 0)                   return '0;
    else if (v > 80'(GMAXQ))     return 64'(GMAXQ);
    else                         return v[63:0];
  endfunction

  always_comb begin
    err     = $signed({1'b0, vref_code}) - $signed({1'b0, vout_code});
    integ_w = 80'(integ) + 80'(KI_Q) * 80'(err);
    integ_n = clamp_g(integ_w);
    g_w     = 80'(integ_n) + 80'(KP_Q) * 80'(err);
    g_n     = clamp_g(g_w);
    // g_n is never negative here, so the product is taken unsigned.
    iref_w  = 128'(unsigned'(g_n)) * 128'(vg_code) * 128'(KVI);
    if (iref_w[127:GF+KVI_F] > 64'(2**BITS - 1))
      iref_n = '1;
    else
      iref_n = iref_w[GF+KVI_F +: BITS];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      integ     <= '0;
      g_in      <= '0;
      iref_code <= '0;
      valid     <= 1'b0;
    end else begin
      valid <= update;
      if (update) begin
        integ     <= integ_n;
        g_in      <= g_n;
        iref_code <= iref_n;
      end
    end
  end

endmodule
