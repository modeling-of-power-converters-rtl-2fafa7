// hil_pkg: shared fixed-point formats and helpers for the boost-converter
// emulation.
//
// All physical quantities that travel between blocks (volts, amperes) use the
// signal format sig_t: a signed 32-bit two's-complement number with 20
// fractional bits (range about +/-2048, resolution about 1e-6). The plant's
// scaled state variables use the wider state format st_t (48 bits, 20
// fractional bits). Model coefficients such as dt/L, dt/C and R* are unsigned
// numbers below one, held as integers scaled by 2^COEF_F.
//
// The word widths and the binary point positions are this design's choice:
// the source describes a QX.Y fixed-point model but does not print X and Y.
package hil_pkg;

  localparam int SIG_W  = 32;
  localparam int SIG_F  = 20;
  localparam int ST_W   = 48;
  localparam int ST_F   = 20;
  localparam int COEF_W = 32;
  localparam int COEF_F = 40;

  typedef logic signed [SIG_W-1:0]  sig_t;
  typedef logic signed [ST_W-1:0]   st_t;
  typedef logic        [COEF_W-1:0] coef_t;

  // Plant operating state, as defined with equations (2)-(8):
  // (a) switch closed, (b) switch open and diode D conducting,
  // (c) switch open and diode D blocking.
  typedef enum logic [1:0] {
    ST_A_SW_CLOSED = 2'd0,
    ST_B_DIODE_ON  = 2'd1,
    ST_C_DIODE_OFF = 2'd2
  } plant_state_e;

  // Real value to signal format (a real-to-integer cast rounds to nearest).
  function automatic sig_t to_sig(real v);
    return sig_t'(longint'(v * 2.0**SIG_F));
  endfunction

  // Real value to the state format, rounded to nearest.
  function automatic st_t to_st(real v);
    return st_t'(longint'(v * 2.0**ST_F));
  endfunction

  // Real coefficient (0 <= v < 2^(COEF_W-COEF_F)) to coefficient format.
  function automatic coef_t to_coef(real v);
    return coef_t'(longint'(v * 2.0**COEF_F));
  endfunction

endpackage
