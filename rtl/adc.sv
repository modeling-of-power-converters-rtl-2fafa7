// adc: sampling analog-to-digital converter model between the converter
// model and the controller.
//
// On each cycle with sample high the input (hil_pkg::sig_t, volts or amperes)
// is converted to an unsigned BITS-bit code, code = floor(x * 2^BITS /
// FULL_SCALE), clamped to 0 .. 2^BITS-1; clipped tells that the last sample
// was clamped. The code appears one clock after the sample strobe and is held
// until the next one.
//
// That the emulated plant includes the ADC follows the source; the
// resolution, full scale, unipolar coding and one-cycle latency are this
// design's choice.
module adc
  import hil_pkg::*;
#(
  parameter int  BITS       = 12,
  parameter real FULL_SCALE = 512.0
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            sample,
  input  sig_t            x,
  output logic [BITS-1:0] code,
  output logic            clipped
);

  localparam int     GF   = 24;
  localparam longint GAIN = longint'(2.0**BITS / FULL_SCALE * 2.0**GF);
  localparam int     PW   = SIG_W + 40;

  logic signed [PW-1:0] prod;
  logic signed [PW-SIG_F-GF-1:0] scaled;
  logic [BITS-1:0] code_n;
  logic            clip_n;

  always_comb begin
    prod   = PW'(x) * PW'(GAIN);
    scaled = prod[PW-1:SIG_F+GF];
    if (scaled < 0) begin
      code_n = '0;
      clip_n = 1'b1;
    end else if (scaled > $signed((PW-SIG_F-GF)'(2**BITS - 1))) begin
      code_n = '1;
      clip_n = 1'b1;
    end else begin
      code_n = scaled[BITS-1:0];
      clip_n = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      code    <= '0;
      clipped <= 1'b0;
    end else if (sample) begin
      code    <= code_n;
      clipped <= clip_n;
    end
  end

endmodule
