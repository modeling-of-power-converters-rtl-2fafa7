// pwm: centre-aligned pulse-width modulator that drives the switch of the
// converter model.
//
// A counter runs over one switching period of PERIOD steps. The duty input,
// in steps (0..PERIOD), is taken at the end of each period and held for the
// next one, so the gate never sees a half-updated value. The on pulse is
// placed in the middle of the period, from (PERIOD-duty)/2 up to but not
// including (PERIOD-duty)/2 + duty. sample pulses for one cycle at the centre
// of the period (count PERIOD/2), the middle of the on pulse, where the
// inductor current equals its average over the period; period_end pulses on
// the last count.
//
// The 100 kHz switching frequency and the 10 ns step, which together give
// 1000 steps per period and a 0.1 % duty resolution, follow the source. The
// centred pulse and the sampling instant are this design's choice.
module pwm #(
  parameter real F_SW   = 100.0e3,  // switching frequency, Hz
  parameter real DT     = 10.0e-9,  // model step, s
  parameter int  PERIOD = int'(1.0 / (F_SW * DT)),
  parameter int  DW     = $clog2(PERIOD + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [DW-1:0] duty,
  output logic          gate,
  output logic          sample,
  output logic          period_end,
  output logic [DW-1:0] count
);

  logic [DW-1:0] duty_q, lo, hi;

  always_comb begin
    lo         = DW'((PERIOD - int'(duty_q)) / 2);
    hi         = lo + duty_q;
    gate       = (count >= lo) && (count < hi);
    sample     = (count == DW'(PERIOD / 2));
    period_end = (count == DW'(PERIOD - 1));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count  <= '0;
      duty_q <= '0;
    end else begin
      count <= period_end ? '0 : count + 1'b1;
      if (period_end)
        duty_q <= (int'(duty) > PERIOD) ? DW'(PERIOD) : duty;
    end
  end

  // The held duty stays within one period, and the gate is never high
  // for longer than that duty.
  a_duty_range: assert property (@(posedge clk) disable iff (rst) int'(duty_q) <= PERIOD);
  a_gate_span:  assert property (@(posedge clk) disable iff (rst) gate |-> count < hi);

endmodule
